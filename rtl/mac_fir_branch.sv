// mac_fir_branch: one polyphase branch of a MAC FIR filter - a sample delay
// line and a single multiply-accumulate engine.
//
// Samples are pushed into a circular delay line with wr_en. A start pulse
// computes  acc = sum_{k=0}^{ntaps-1} c[k] * d[n-k],  where d[n] is the newest
// sample, one product per clock. The branch presents the coefficient index k
// on coef_idx and expects the coefficient on coef in the same cycle (an
// asynchronous ROM in the parent). The result appears on acc_out with a
// one-cycle done pulse, ntaps+1 cycles after start. busy is high meanwhile.
//
// The delay line holds MAX_TAPS+1 samples, so one new sample may be written
// while a sum is running without disturbing the window being read. A MAC
// engine whose size does not depend on the filter order, trading clock cycles
// per sample for logic, is the design's choice for the FIR stages; the single
// product per clock and the extra delay-line slot are this implementation's.
module mac_fir_branch
  import dfe_pkg::*;
#(
  parameter int unsigned DATA_W_P = DATA_W,
  parameter int unsigned COEF_W_P = COEF_W,
  parameter int unsigned MAX_TAPS = 24,
  parameter int unsigned ACC_W    = DATA_W_P + COEF_W_P + $clog2(MAX_TAPS) + 1,
  localparam int unsigned IDX_W   = $clog2(MAX_TAPS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       wr_en,
  input  logic signed [DATA_W_P-1:0] wr_data,
  input  logic                       start,
  input  logic [IDX_W-1:0]           ntaps,
  output logic [IDX_W-1:0]           coef_idx,
  input  logic signed [COEF_W_P-1:0] coef,
  output logic                       busy,
  output logic                       done,
  output logic signed [ACC_W-1:0]    acc_out
);

  localparam int unsigned DEPTH = MAX_TAPS + 1;
  localparam int unsigned PTR_W = $clog2(DEPTH);

  logic signed [DATA_W_P-1:0] line [DEPTH];
  logic [PTR_W-1:0]           wptr;    // next slot to write
  logic [PTR_W-1:0]           rptr;    // slot read in the current MAC cycle
  logic [PTR_W-1:0]           newest;
  logic [IDX_W-1:0]           k;
  logic signed [ACC_W-1:0]    acc;
  logic signed [ACC_W-1:0]    prod;

  function automatic logic [PTR_W-1:0] dec_ptr(input logic [PTR_W-1:0] p);
    return (p == '0) ? PTR_W'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign newest   = dec_ptr(wptr);
  assign coef_idx = k;
  assign prod     = ACC_W'(line[rptr]) * ACC_W'(coef);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      rptr    <= '0;
      k       <= '0;
      acc     <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      acc_out <= '0;
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else if (clr) begin
      wptr    <= '0;
      rptr    <= '0;
      k       <= '0;
      acc     <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      acc_out <= '0;
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else begin
      done <= 1'b0;
      if (wr_en) begin
        line[wptr] <= wr_data;
        wptr       <= (wptr == PTR_W'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      end
      if (start) begin
        // Start from the newest sample (including one written this cycle).
        rptr <= wr_en ? wptr : newest;
        k    <= '0;
        acc  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc  <= acc + prod;
        rptr <= dec_ptr(rptr);
        if (k == ntaps - 1'b1) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          acc_out <= acc + prod;
          k       <= '0;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

  // A new sum may only start once the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n || clr) start |-> !busy)
    else $error("mac_fir_branch: start while busy (input rate too high)");

endmodule
