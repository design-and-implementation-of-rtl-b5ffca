// iq_downconv: multiplier-free quadrature down-conversion of the sub-sampled
// IF bitstream.
//
// The IF is sampled at fs = 4*IF/3, so the wanted channel sits at 3fs/4 and
// the cosine and sine carriers reduce to the sequences [1 0 -1 0] and
// [0 1 0 -1]. Instead of two multipliers, a 2-bit phase counter (the mux
// "control") selects for each output the bitstream value x, its negation -x
// or 0:
//   phase 0: I =  x, Q =  0      phase 2: I = -x, Q =  0
//   phase 1: I =  0, Q =  x      phase 3: I =  0, Q = -x
// The carrier sequences, the mux structure and its 4-bit output words
// (CIC_IN_W) follow the design's specification; coding the 1-bit bitstream as x = +1 (bit 1) / -1 (bit 0)
// is this implementation's choice.
//
// Interface: one bit per in_valid (in the full design every clock, the clock
// being the sample clock fs). Outputs are registered: I/Q for an input appear
// one cycle later with out_valid. clr restarts the phase at 0.
module iq_downconv
  import dfe_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  input  logic                        in_valid,
  input  logic                        in_bit,
  output logic                        out_valid,
  output logic signed [CIC_IN_W-1:0]  i_out,
  output logic signed [CIC_IN_W-1:0]  q_out
);

  logic [1:0]                 phase;    // mux control
  logic signed [CIC_IN_W-1:0] x, x_neg;
  logic signed [CIC_IN_W-1:0] i_d, q_d;

  assign x     = in_bit ? CIC_IN_W'(1) : -CIC_IN_W'(1);
  assign x_neg = -x;

  always_comb begin
    unique case (phase)
      2'd0:    begin i_d = x;     q_d = '0;    end
      2'd1:    begin i_d = '0;    q_d = x;     end
      2'd2:    begin i_d = x_neg; q_d = '0;    end
      default: begin i_d = '0;    q_d = x_neg; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else if (clr) begin
      phase     <= '0;
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase <= phase + 2'd1;
        i_out <= i_d;
        q_out <= q_d;
      end
    end
  end

endmodule
