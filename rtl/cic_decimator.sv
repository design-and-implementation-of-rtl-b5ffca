// cic_decimator: 5th-order comb (CIC) decimator for GSM (M=16, R=1) and
// DECT (M=8, R=2).
//
// H(z) = ((1 - z^-RM) / (1 - z^-1))^N is split into N integrators running at
// the input rate and N combs (1 - z^-R) running after the decimator, so no
// multiplier is needed. All registers are REG_W = N*log2(R*M) + B_in bits wide
// and use two's-complement wrap-around: the integrators overflow freely and
// the combs undo it, as long as REG_W meets that bound (R*M = 16 for both
// standards, so one width serves both). The 1/M^N gain of the transfer
// function is not applied; the output carries the full gain (R*M)^N = 2^20.
// Structure, N, M, R and the register width follow the design's
// specification.
//
// Timing: each in_valid updates the integrator chain (adder output feeds the
// next stage in the same cycle, as in the structure diagram). Every M-th input
// the comb chain is evaluated and its result is registered: out_valid pulses
// one cycle after that M-th input. The first output uses inputs 0..M-1 after
// reset or clr. std_sel selects M and R; change it only together with clr.
module cic_decimator
  import dfe_pkg::*;
#(
  parameter int unsigned N      = CIC_N,
  parameter int unsigned IN_W   = CIC_IN_W,
  parameter int unsigned REG_W  = CIC_REG_W,
  parameter int unsigned M_GSM  = CIC_M_GSM,
  parameter int unsigned R_GSM  = CIC_R_GSM,
  parameter int unsigned M_DECT = CIC_M_DECT,
  parameter int unsigned R_DECT = CIC_R_DECT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  std_e                    std_sel,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [REG_W-1:0] out_data
);

  localparam int unsigned M_MAX = (M_GSM > M_DECT) ? M_GSM : M_DECT;
  localparam int unsigned R_MAX = (R_GSM > R_DECT) ? R_GSM : R_DECT;
  localparam int unsigned CNT_W = $clog2(M_MAX);
  localparam int unsigned RSEL_W = (R_MAX > 1) ? $clog2(R_MAX) : 1;

  typedef logic signed [REG_W-1:0] reg_t;

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] m_last;
  logic [RSEL_W-1:0] r_sel;      // differential delay minus one

  reg_t integ      [N];          // integrator registers (z^-1 in the feedback)
  reg_t integ_next [N];
  reg_t comb_dly   [N][R_MAX];   // comb delay lines, [k][0] is the newest
  reg_t comb_in    [N+1];        // comb chain, comb_in[0] is the decimated sample
  logic dec_strobe;

  assign m_last = (std_sel == STD_GSM) ? CNT_W'(M_GSM - 1) : CNT_W'(M_DECT - 1);
  assign r_sel  = (std_sel == STD_GSM) ? RSEL_W'(R_GSM - 1) : RSEL_W'(R_DECT - 1);

  // Integrator chain: each adder's output feeds the next adder.
  always_comb begin
    integ_next[0] = integ[0] + reg_t'(in_data);
    for (int k = 1; k < N; k++) integ_next[k] = integ[k] + integ_next[k-1];
  end

  assign dec_strobe = in_valid && (cnt == m_last);

  // Comb chain at the decimated rate.
  always_comb begin
    comb_in[0] = integ_next[N-1];
    for (int k = 0; k < N; k++) comb_in[k+1] = comb_in[k] - comb_dly[k][r_sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < N; k++) begin
        integ[k] <= '0;
        for (int r = 0; r < R_MAX; r++) comb_dly[k][r] <= '0;
      end
    end else if (clr) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < N; k++) begin
        integ[k] <= '0;
        for (int r = 0; r < R_MAX; r++) comb_dly[k][r] <= '0;
      end
    end else begin
      out_valid <= dec_strobe;
      if (in_valid) begin
        for (int k = 0; k < N; k++) integ[k] <= integ_next[k];
        cnt <= (cnt == m_last) ? '0 : cnt + 1'b1;
      end
      if (dec_strobe) begin
        out_data <= comb_in[N];
        for (int k = 0; k < N; k++) begin
          comb_dly[k][0] <= comb_in[k];
          for (int r = 1; r < R_MAX; r++) comb_dly[k][r] <= comb_dly[k][r-1];
        end
      end
    end
  end

endmodule
