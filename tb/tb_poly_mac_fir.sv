// tb_poly_mac_fir: self-checking test of the polyphase MAC FIR decimator.
// The testbench plays the coefficient ROM (random table) and feeds random
// 24-bit samples at random spacing no shorter than the filter allows, for
// filter lengths 48, 32, 24 and 16 (clr between them). Every output is
// compared with the direct-form decimating FIR y[m] = sum h[k] x[2m-k],
// rounded by 15 bits and saturated to 24 bits; one run with full-scale
// inputs and coefficients forces saturation. Output latency must be
// T/2 + 2 cycles after x[2m].
module tb_poly_mac_fir;
  import dfe_pkg::*;

  localparam int unsigned MAX_TAPS = 48;
  localparam int unsigned TAP_W = $clog2(MAX_TAPS + 1);

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0;
  logic [TAP_W-1:0] ntaps = '0;
  data_t in_data = '0;
  logic [$clog2(MAX_TAPS/2+1)-1:0] coef_idx_a, coef_idx_b;
  coef_t coef_a, coef_b;
  logic out_valid;
  data_t out_data;
  int checks = 0, failures = 0;

  coef_t h [MAX_TAPS];
  assign coef_a = (2 * int'(coef_idx_a) < MAX_TAPS) ? h[2 * int'(coef_idx_a)] : '0;
  assign coef_b = (2 * int'(coef_idx_b) + 1 < MAX_TAPS) ? h[2 * int'(coef_idx_b) + 1] : '0;

  poly_mac_fir #(.MAX_TAPS(MAX_TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  longint got [$];
  int     got_t [$];
  int     sat_seen = 0;
  int     tin [$];
  // Edge counter: an input taken at edge c and an output sampled at edge c'
  // are c' - c edges apart.
  always @(posedge clk) begin
    cycle++;
    if (in_valid) tin.push_back(cycle);
    if (out_valid) begin got.push_back(longint'(out_data)); got_t.push_back(cycle); end
  end

  function automatic longint ref_out(input longint acc);
    longint r;
    r = (acc + (longint'(1) <<< 14)) >>> 15;
    if (r > 64'sd8388607) r = 64'sd8388607;
    if (r < -64'sd8388608) r = -64'sd8388608;
    return r;
  endfunction

  task automatic run(input int t, input int nin, input bit full_scale);
    longint x [$];
    longint acc, e;
    int nout;
    @(negedge clk);
    clr = 1'b1; ntaps = TAP_W'(t);
    for (int i = 0; i < MAX_TAPS; i++)
      h[i] = full_scale ? ((i % 2 == 0) ? coef_t'(32767) : coef_t'(-32768)) : coef_t'($urandom);
    @(negedge clk);
    clr = 1'b0;
    got.delete(); got_t.delete(); tin.delete();
    for (int n = 0; n < nin; n++) begin
      if (full_scale) x.push_back((n % 2 == 0) ? 64'sd8388607 : -64'sd8388608);
      else x.push_back(longint'(data_t'($urandom)));
      in_valid = 1'b1; in_data = data_t'(x[n]);
      @(negedge clk);
      in_valid = 1'b0;
      repeat ($urandom_range(t / 4, t / 4 + 4)) @(negedge clk);
    end
    repeat (t + 4) @(negedge clk);
    nout = (nin + 1) / 2;
    checks++;
    if (got.size() != nout) begin
      failures++;
      $display("T=%0d expected %0d outputs, got %0d", t, nout, got.size());
    end
    for (int m = 0; m < nout && m < got.size(); m++) begin
      acc = 0;
      for (int k = 0; k < t; k++)
        if (2*m - k >= 0) acc += longint'(h[k]) * x[2*m-k];
      e = ref_out(acc);
      if (e == 64'sd8388607 || e == -64'sd8388608) sat_seen++;
      checks++;
      if (got[m] != e) begin
        failures++;
        if (failures < 10) $display("T=%0d m=%0d exp %0d got %0d", t, m, e, got[m]);
      end
      checks++;
      if (got_t[m] - tin[2*m] != t / 2 + 2) begin
        failures++;
        if (failures < 10) $display("T=%0d m=%0d latency %0d", t, m, got_t[m] - tin[2*m]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(48, 200, 0);
    run(32, 200, 0);
    run(24, 120, 0);
    run(16, 120, 0);
    run(48, 60, 1);
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
