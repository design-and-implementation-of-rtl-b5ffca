// tb_isinc_fir: self-checking test of the inverse-sinc stage in both standards.
// Random samples in the comb decimator's output range arrive at the rate the
// stage sees in the full chain (every 16 clocks for GSM, 8 for DECT).
// Outputs are compared with the direct-form decimating FIR
// y[m] = sum h[k] x[2m-k] over the standard's table (24 / 16 taps), rounded
// by 15 bits; output spacing must be twice the input spacing. A constant
// input must settle to the table's DC gain, and the standard is switched
// with clr.
module tb_isinc_fir;
  import dfe_pkg::*;
  import dfe_coef_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0;
  std_e std_sel = STD_GSM;
  data_t in_data = '0;
  logic out_valid;
  data_t out_data;
  int checks = 0, failures = 0;

  isinc_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  longint got [$];
  int     got_t [$];
  always @(posedge clk) begin
    cycle++;
    if (out_valid) begin got.push_back(longint'(out_data)); got_t.push_back(cycle); end
  end

  function automatic longint coef(input std_e s, input int k);
    if (s == STD_GSM) return (k < 24) ? longint'(ISINC_GSM[k]) : 0;
    else              return (k < 16) ? longint'(ISINC_DECT[k]) : 0;
  endfunction

  task automatic run(input std_e s, input int nin, input bit dc);
    longint x [$];
    longint acc, e, hsum;
    int t, sp, nout;
    t  = (s == STD_GSM) ? 24 : 16;
    sp = (s == STD_GSM) ? 16 : 8;
    @(negedge clk);
    clr = 1'b1; std_sel = s;
    @(negedge clk);
    clr = 1'b0;
    got.delete(); got_t.delete();
    for (int n = 0; n < nin; n++) begin
      x.push_back(dc ? 64'sd1048576 : longint'($urandom_range(0, 2097152)) - 64'sd1048576);
      in_valid = 1'b1; in_data = data_t'(x[n]);
      @(negedge clk);
      in_valid = 1'b0;
      repeat (sp - 1) @(negedge clk);
    end
    repeat (2 * sp) @(negedge clk);
    nout = (nin + 1) / 2;
    checks++;
    if (got.size() != nout) begin
      failures++;
      $display("%s: expected %0d outputs, got %0d", s.name(), nout, got.size());
    end
    hsum = 0;
    for (int k = 0; k < t; k++) hsum += coef(s, k);
    for (int m = 0; m < nout && m < got.size(); m++) begin
      acc = 0;
      for (int k = 0; k < t; k++)
        if (2*m - k >= 0) acc += coef(s, k) * x[2*m-k];
      e = (acc + (longint'(1) <<< 14)) >>> 15;
      checks++;
      if (got[m] != e) begin
        failures++;
        if (failures < 10) $display("%s m=%0d exp %0d got %0d", s.name(), m, e, got[m]);
      end
      if (m > 0) begin
        checks++;
        if (got_t[m] - got_t[m-1] != 2 * sp) failures++;
      end
      if (dc && 2*m >= t) begin
        checks++;
        if (got[m] != ((64'sd1048576 * hsum + (longint'(1) <<< 14)) >>> 15)) failures++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(STD_GSM, 200, 0);
    run(STD_DECT, 200, 0);
    run(STD_GSM, 100, 1);
    run(STD_DECT, 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
