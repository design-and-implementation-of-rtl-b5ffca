// poly_mac_fir: polyphase MAC FIR decimator by 2.
//
// Computes  y[m] = sum_{k=0}^{T-1} h[k] * x[2m-k]  (T = ntaps, even) by the
// two-branch polyphase structure: the input and its one-sample delay are each
// decimated by 2 and filtered by two MAC sub-filters, one holding the odd-
// numbered coefficients h1, h3, ... (h[0], h[2], ... counting from 0) and one
// holding the even-numbered h2, h4, ... (h[1], h[3], ...). The two partial
// sums are added, rounded (round half up) by COEF_FRAC bits and saturated to
// DATA_W_P bits. Both branches run their T/2 products in parallel, one per
// clock, so the filter needs T/2 + 2 clock cycles per output, far fewer than
// the clock cycles available between two outputs at the design's rates. The
// branch structure follows the design's specification; rounding, saturation
// and the coefficient word size are this implementation's choices.
//
// Interface: samples arrive with in_valid. Counting from reset or clr, sample
// x[2m] goes to the direct branch and starts output m; x[2m+1] goes to the
// delayed branch. Coefficients are read from the parent through two
// asynchronous ports: the parent returns h[2j] on coef_a for j = coef_idx_a
// and h[2j+1] on coef_b for j = coef_idx_b. out_valid pulses T/2 + 2 cycles
// after the sample x[2m].
// Samples must be at least T/4 + 1 cycles apart (checked by an assertion).
module poly_mac_fir
  import dfe_pkg::*;
#(
  parameter int unsigned DATA_W_P  = DATA_W,
  parameter int unsigned COEF_W_P  = COEF_W,
  parameter int unsigned COEF_FR   = COEF_FRAC,
  parameter int unsigned MAX_TAPS  = 48,
  localparam int unsigned TAP_W    = $clog2(MAX_TAPS + 1),
  localparam int unsigned BR_TAPS  = MAX_TAPS / 2,
  localparam int unsigned BR_IDX_W = $clog2(BR_TAPS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic [TAP_W-1:0]           ntaps,
  input  logic                       in_valid,
  input  logic signed [DATA_W_P-1:0] in_data,
  output logic [BR_IDX_W-1:0]        coef_idx_a,
  input  logic signed [COEF_W_P-1:0] coef_a,
  output logic [BR_IDX_W-1:0]        coef_idx_b,
  input  logic signed [COEF_W_P-1:0] coef_b,
  output logic                       out_valid,
  output logic signed [DATA_W_P-1:0] out_data
);

  localparam int unsigned ACC_W = DATA_W_P + COEF_W_P + $clog2(BR_TAPS) + 1;
  localparam int unsigned SUM_W = ACC_W + 1;

  logic                    phase;            // 0: next sample is x[2m]
  logic [BR_IDX_W-1:0]     br_taps;
  logic                    wr_a, wr_b, start;
  logic                    busy_a, busy_b, done_a, done_b;
  logic signed [ACC_W-1:0] acc_a, acc_b;
  logic signed [SUM_W-1:0] sum, rounded;

  localparam logic signed [SUM_W-1:0] SAT_MAX = SUM_W'({1'b0, {(DATA_W_P-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] SAT_MIN = -SAT_MAX - 1;

  assign br_taps = BR_IDX_W'(ntaps >> 1);
  assign wr_a    = in_valid && !phase;
  assign wr_b    = in_valid &&  phase;
  assign start   = wr_a;

  // Odd-numbered coefficients h1, h3, ... on the direct branch.
  mac_fir_branch #(
    .DATA_W_P(DATA_W_P), .COEF_W_P(COEF_W_P), .MAX_TAPS(BR_TAPS), .ACC_W(ACC_W)
  ) u_odd (
    .clk, .rst_n, .clr,
    .wr_en(wr_a), .wr_data(in_data), .start, .ntaps(br_taps),
    .coef_idx(coef_idx_a), .coef(coef_a),
    .busy(busy_a), .done(done_a), .acc_out(acc_a)
  );

  // Even-numbered coefficients h2, h4, ... on the delayed branch.
  mac_fir_branch #(
    .DATA_W_P(DATA_W_P), .COEF_W_P(COEF_W_P), .MAX_TAPS(BR_TAPS), .ACC_W(ACC_W)
  ) u_even (
    .clk, .rst_n, .clr,
    .wr_en(wr_b), .wr_data(in_data), .start, .ntaps(br_taps),
    .coef_idx(coef_idx_b), .coef(coef_b),
    .busy(busy_b), .done(done_b), .acc_out(acc_b)
  );

  assign sum     = SUM_W'(acc_a) + SUM_W'(acc_b);
  assign rounded = (sum + (SUM_W'(1) <<< (COEF_FR - 1))) >>> COEF_FR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clr) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_valid) phase <= !phase;
      out_valid <= done_a;
      if (done_a) begin
        if (rounded > SAT_MAX)      out_data <= DATA_W_P'(SAT_MAX);
        else if (rounded < SAT_MIN) out_data <= DATA_W_P'(SAT_MIN);
        else                        out_data <= DATA_W_P'(rounded);
      end
    end
  end

  // Both branches run the same number of products and finish together.
  assert property (@(posedge clk) disable iff (!rst_n || clr)
                   (done_a == done_b) && (busy_a == busy_b))
    else $error("poly_mac_fir: branches out of step");
endmodule
