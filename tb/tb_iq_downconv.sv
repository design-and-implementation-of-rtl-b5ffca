// tb_iq_downconv: self-checking test of the fs/4 quadrature mux.
// Random bits, random gaps in in_valid and a clr in the middle; every output
// is compared with x*cos and x*sin sequences [1 0 -1 0] / [0 1 0 -1] kept by
// the testbench's own sample counter.
module tb_iq_downconv;
  import dfe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  logic out_valid;
  logic signed [CIC_IN_W-1:0] i_out, q_out;
  int checks = 0, failures = 0;

  iq_downconv dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;                 // samples since reset / clr
  int exp_i, exp_q, xv;
  logic       pend;
  int         pend_i, pend_q;
  localparam int COS [4] = '{1, 0, -1, 0};
  localparam int SIN [4] = '{0, 1, 0, -1};

  initial begin
    pend = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check the output produced by the previous edge
      if (pend) begin
        checks++;
        if (!out_valid || int'(i_out) != pend_i || int'(q_out) != pend_q) begin
          failures++;
          if (failures < 10) $display("t=%0d exp I=%0d Q=%0d got v=%0b I=%0d Q=%0d",
                                      t, pend_i, pend_q, out_valid, i_out, q_out);
        end
      end else begin
        checks++;
        if (out_valid) failures++;
      end
      clr = (t == 1001);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit = 1'($urandom);
      pend = 1'b0;
      if (clr) n = 0;
      else if (in_valid) begin
        xv = in_bit ? 1 : -1;
        pend_i = xv * COS[n % 4];
        pend_q = xv * SIN[n % 4];
        pend = 1'b1;
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
