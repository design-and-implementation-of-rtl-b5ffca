// tb_cic_decimator: self-checking test of the 5th-order comb decimator in
// both standards. Random +1/0/-1 input; each output is compared with the
// direct convolution of the input with the CIC impulse response, h = box of
// length R*M convolved with itself five times, at the decimation instants
// (M*(m+1) - 1). Checks that out_valid comes one cycle after every M-th
// input and that outputs are M cycles apart; includes an all +1 run for the
// full-scale value (R*M)^5 = 2^20 and switches standard with clr.
module tb_cic_decimator;
  import dfe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0;
  std_e std_sel = STD_GSM;
  logic signed [CIC_IN_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [CIC_REG_W-1:0] out_data;
  int checks = 0, failures = 0;

  cic_decimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [4096];
  longint h [128];
  int hlen;

  task automatic make_h(input int rm);
    longint a [128], b [128];
    int len;
    foreach (a[i]) a[i] = 0;
    for (int i = 0; i < rm; i++) a[i] = 1;
    len = rm;
    for (int s = 1; s < 5; s++) begin
      foreach (b[i]) b[i] = 0;
      for (int i = 0; i < len; i++)
        for (int j = 0; j < rm; j++) b[i+j] += a[i];
      len = len + rm - 1;
      a = b;
    end
    h = a;
    hlen = len;
  endtask

  task automatic run(input std_e s, input int nin, input int mode_all_ones);
    int m, r, nout, last_out_t, t;
    longint acc;
    m = (s == STD_GSM) ? 16 : 8;
    r = (s == STD_GSM) ? 1 : 2;
    make_h(r * m);
    // flush and switch
    @(negedge clk);
    clr = 1'b1; std_sel = s; in_valid = 1'b0;
    @(negedge clk);
    clr = 1'b0;
    nout = 0; last_out_t = -1; t = 0;
    for (int n = 0; n < nin; n++) begin
      x[n] = mode_all_ones ? 1 : $urandom_range(0, 2) - 1;
      in_valid = 1'b1;
      in_data = CIC_IN_W'(x[n]);
      @(negedge clk);
      t++;
      // out_valid must be high exactly one cycle after input M*(k+1)-1
      checks++;
      if (out_valid !== ((n % m) == m - 1)) begin
        failures++;
        $display("valid timing error n=%0d", n);
      end
      if (out_valid) begin
        acc = 0;
        for (int k = 0; k < hlen; k++)
          if (n - k >= 0) acc += h[k] * x[n-k];
        checks++;
        if (longint'(out_data) != acc) begin
          failures++;
          if (failures < 10) $display("std=%s out %0d exp %0d got %0d", s.name(), nout, acc, out_data);
        end
        if (mode_all_ones && n >= hlen) begin
          checks++;
          if (longint'(out_data) != (longint'(1) << 20)) failures++;
        end
        if (last_out_t >= 0) begin
          checks++;
          if (t - last_out_t != m) failures++;
        end
        last_out_t = t;
        nout++;
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(STD_GSM, 1600, 0);
    run(STD_DECT, 1600, 0);
    run(STD_GSM, 400, 1);
    run(STD_DECT, 400, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
