// tb_mac_fir_branch: self-checking test of one MAC FIR branch.
// The testbench acts as the coefficient ROM (random table), pushes random
// 24-bit samples, starts sums of random length 1..MAX_TAPS (sometimes in the
// same cycle as a write, sometimes with a write while the sum runs) and
// compares acc_out with the sum of products computed from its own sample
// history. done must come exactly ntaps+1 cycles after start.
module tb_mac_fir_branch;
  import dfe_pkg::*;

  localparam int unsigned MAX_TAPS = 24;
  localparam int unsigned IDX_W = $clog2(MAX_TAPS + 1);
  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(MAX_TAPS) + 1;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic wr_en = 1'b0, start = 1'b0;
  logic signed [DATA_W-1:0] wr_data = '0;
  logic [IDX_W-1:0] ntaps = '0, coef_idx;
  logic signed [COEF_W-1:0] coef;
  logic busy, done;
  logic signed [ACC_W-1:0] acc_out;
  int checks = 0, failures = 0;

  coef_t cmem [MAX_TAPS];
  assign coef = (int'(coef_idx) < MAX_TAPS) ? cmem[coef_idx[$clog2(MAX_TAPS)-1:0]] : '0;

  mac_fir_branch #(.MAX_TAPS(MAX_TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [$];   // all samples written since reset/clr, newest last

  task automatic push(input logic signed [DATA_W-1:0] d);
    wr_en = 1'b1; wr_data = d; hist.push_back(longint'(d));
  endtask

  initial begin
    int nt, lat, nh;
    longint expv;
    bit extreme;
    foreach (cmem[i]) cmem[i] = coef_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 400; trial++) begin
      extreme = (trial % 10 == 9);
      if (trial == 200) begin
        @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
        hist.delete();
      end
      // a few writes
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        push(extreme ? {1'b1, {(DATA_W-1){1'b0}}} : DATA_W'($urandom));
        @(negedge clk);
        wr_en = 1'b0;
      end
      @(negedge clk);
      nt = $urandom_range(1, MAX_TAPS);
      if (extreme) begin
        nt = MAX_TAPS;
        foreach (cmem[i]) cmem[i] = {1'b1, {(COEF_W-1){1'b0}}};
      end
      ntaps = IDX_W'(nt);
      start = 1'b1;
      if ($urandom_range(0, 1) != 0) push(DATA_W'($urandom));
      // reference: newest sample first
      nh = hist.size();
      expv = 0;
      for (int k = 0; k < nt; k++)
        if (nh - 1 - k >= 0) expv += longint'(cmem[k]) * hist[nh-1-k];
      @(negedge clk);
      start = 1'b0; wr_en = 1'b0;
      lat = 1;
      // one write while running
      if ($urandom_range(0, 1) != 0) begin
        push(DATA_W'($urandom));
        @(negedge clk); wr_en = 1'b0; lat++;
      end
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != nt + 1) begin
        failures++;
        $display("latency %0d expected %0d", lat, nt + 1);
      end
      checks++;
      if (longint'(acc_out) != expv) begin
        failures++;
        if (failures < 10) $display("trial %0d ntaps %0d exp %0d got %0d", trial, nt, expv, acc_out);
      end
      if (extreme) foreach (cmem[i]) cmem[i] = coef_t'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
