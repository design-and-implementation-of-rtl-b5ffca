// dfe_top: digital front-end of a GSM / DECT multi-standard receiver.
//
// The band-pass sigma-delta modulator samples a fixed IF at fs = 4*IF/3
// (second Nyquist zone) and delivers one bit per clock: the master clock is
// the sample clock, 17.333 MHz for GSM (IF 13 MHz) and 73.728 MHz for DECT
// (IF 55.296 MHz). The front-end turns this bitstream into a 24-bit complex
// baseband channel at the standard's output rate:
//
//   bit -> iq_downconv -> I,Q (+1/0/-1 at fs)
//        -> cic_decimator  /16 (GSM, R=1) or /8 (DECT, R=2)  -> 4x output rate
//        -> isinc_fir      /2, droop compensation            -> 2x output rate
//        -> channel_fir    /2, channel selection             -> output rate
//
// giving one I/Q pair every 64 clocks for GSM (270.833 kS/s, the symbol rate)
// and every 32 clocks for DECT (2.304 MS/s, twice the symbol rate). I and Q
// each have their own comb and FIR stages; each FIR stage is a polyphase MAC
// filter that uses one multiplier per branch and spends several master clock
// cycles per output. The chain and its rates follow the design's
// specification.
//
// Standard switching is this implementation's own: std_sel may change at any
// time; the cycle after a change all stages are flushed (state and delay
// lines cleared, the input bit of that cycle dropped) and restart with the
// new decimation ratios, differential delays and coefficient tables.
// std_active shows the standard the chain is running.
//
// Interface: in_valid/in_bit, one bitstream sample per clock (in_valid may be
// held high). out_valid pulses once per output sample with i_out/q_out.
module dfe_top
  import dfe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  std_e  std_sel,
  input  logic  in_valid,
  input  logic  in_bit,
  output std_e  std_active,
  output logic  out_valid,
  output data_t i_out,
  output data_t q_out
);

  std_e std_q;
  logic clr;

  // Mode switch: a change of std_sel flushes the whole chain for one cycle.
  assign clr        = (std_sel != std_q);
  assign std_active = std_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) std_q <= STD_GSM;
    else        std_q <= std_sel;
  end

  // Quadrature down-conversion
  logic                       dc_valid;
  logic signed [CIC_IN_W-1:0] dc_i, dc_q;

  iq_downconv u_dc (
    .clk, .rst_n, .clr,
    .in_valid, .in_bit,
    .out_valid(dc_valid), .i_out(dc_i), .q_out(dc_q)
  );

  // Comb decimators
  logic                        cic_valid_i, cic_valid_q;
  logic signed [CIC_REG_W-1:0] cic_i, cic_q;

  cic_decimator u_cic_i (
    .clk, .rst_n, .clr, .std_sel(std_q),
    .in_valid(dc_valid), .in_data(dc_i),
    .out_valid(cic_valid_i), .out_data(cic_i)
  );

  cic_decimator u_cic_q (
    .clk, .rst_n, .clr, .std_sel(std_q),
    .in_valid(dc_valid), .in_data(dc_q),
    .out_valid(cic_valid_q), .out_data(cic_q)
  );

  // Inverse-sinc stage
  logic  is_valid_i, is_valid_q;
  data_t is_i, is_q;

  isinc_fir u_isinc_i (
    .clk, .rst_n, .clr, .std_sel(std_q),
    .in_valid(cic_valid_i), .in_data(data_t'(cic_i)),
    .out_valid(is_valid_i), .out_data(is_i)
  );

  isinc_fir u_isinc_q (
    .clk, .rst_n, .clr, .std_sel(std_q),
    .in_valid(cic_valid_q), .in_data(data_t'(cic_q)),
    .out_valid(is_valid_q), .out_data(is_q)
  );

  // Channel-select stage
  logic ch_valid_i, ch_valid_q;

  channel_fir u_chan_i (
    .clk, .rst_n, .clr, .std_sel(std_q),
    .in_valid(is_valid_i), .in_data(is_i),
    .out_valid(ch_valid_i), .out_data(i_out)
  );

  channel_fir u_chan_q (
    .clk, .rst_n, .clr, .std_sel(std_q),
    .in_valid(is_valid_q), .in_data(is_q),
    .out_valid(ch_valid_q), .out_data(q_out)
  );

  assign out_valid = ch_valid_i;

  // I and Q run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) ch_valid_i == ch_valid_q)
    else $error("dfe_top: I and Q outputs out of step");

endmodule
