// tb_dfe_top: end-to-end test of the GSM/DECT digital front-end at its
// default sizes.
//
// A behavioural 4th-order band-pass sigma-delta modulator (1-bit output,
// noise notch at fs/4 and 3fs/4) turns a tone
// 30 kHz (GSM) or 200 kHz (DECT) above 3fs/4 into the bitstream. The
// testbench keeps its own model of the whole chain - fs/4 mixing with the
// cosine/sine sequences, the comb decimator as a direct convolution with its
// impulse response, and both FIR stages as direct-form decimating filters
// with 15-bit rounding and 24-bit saturation - and compares every I and Q
// output with it. It runs GSM, switches to DECT, and back to GSM, and checks:
// outputs 64 (GSM) / 32 (DECT) clocks apart, decimation at each stage, the
// flush on each standard change, and that the channel output carries the
// tone (non-trivial amplitude). It also repeats the bench test of the
// original hardware, a constant 1 at the input, in both standards, where
// the output must keep its 64 / 32 clock period. Each mechanism must be seen
// at least once.
module tb_dfe_top;
  import dfe_pkg::*;
  import dfe_coef_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  std_e std_sel = STD_GSM;
  std_e std_active;
  logic out_valid;
  data_t i_out, q_out;
  int checks = 0, failures = 0;

  dfe_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters (from the DUT's internal strobes)
  int n_cic = 0, n_isinc = 0, n_out = 0, n_switch = 0, n_flush = 0, n_const = 0;
  int cycle = 0;
  longint got_i [$], got_q [$];
  int     got_t [$];
  always @(posedge clk) begin
    cycle++;
    if (dut.cic_valid_i)  n_cic++;
    if (dut.is_valid_i)   n_isinc++;
    if (dut.clr)          n_flush++;
    if (out_valid) begin
      n_out++;
      got_i.push_back(longint'(i_out));
      got_q.push_back(longint'(q_out));
      got_t.push_back(cycle);
    end
  end

  // ---------------- behavioural band-pass sigma-delta modulator
  // A second-order low-pass modulator (x1 += v - y; x2 += x1 - 2y;
  // y = sign(x2)) turned into a fourth-order band-pass one centred on fs/4
  // (and 3fs/4) by the substitution z^-1 -> -z^-2: two interleaved low-pass
  // loops on even and odd samples, input and output multiplied by (-1)^(n/2).
  real x1 [2] = '{0.0, 0.0};
  real x2 [2] = '{0.0, 0.0};
  function automatic bit sdm_step(input int n, input real u);
    int p;
    real sg, v, y;
    p  = n % 2;
    sg = ((n / 2) % 2 == 1) ? -1.0 : 1.0;
    v  = sg * u;
    y  = (x2[p] >= 0.0) ? 1.0 : -1.0;
    x1[p] = x1[p] + v - y;
    x2[p] = x2[p] + x1[p] - 2.0 * y;
    return (sg * y > 0.0);
  endfunction

  // ---------------- reference chain
  function automatic longint rnd_sat(input longint acc);
    longint r;
    r = (acc + (longint'(1) <<< 14)) >>> 15;
    if (r > 64'sd8388607) r = 64'sd8388607;
    if (r < -64'sd8388608) r = -64'sd8388608;
    return r;
  endfunction

  function automatic longint hcoef(input std_e s, input bit chan, input int k);
    if (s == STD_GSM) begin
      if (chan) return (k < CHAN_TAPS_GSM)  ? longint'(FIR_GSM[k])   : 0;
      else      return (k < ISINC_TAPS_GSM) ? longint'(ISINC_GSM[k]) : 0;
    end else begin
      if (chan) return (k < CHAN_TAPS_DECT)  ? longint'(FIR_DECT[k])   : 0;
      else      return (k < ISINC_TAPS_DECT) ? longint'(ISINC_DECT[k]) : 0;
    end
  endfunction

  // Full chain on one channel's mixed samples x[] (+1/0/-1).
  task automatic ref_chain(input std_e s, input longint x [$], output longint y [$]);
    longint cic [$], isv [$], box [$], h [$], tmp [$];
    longint acc;
    int m, rm, nc, ti, tc;
    m  = (s == STD_GSM) ? 16 : 8;
    rm = (s == STD_GSM) ? 16 : 16;
    ti = (s == STD_GSM) ? ISINC_TAPS_GSM : ISINC_TAPS_DECT;
    tc = (s == STD_GSM) ? CHAN_TAPS_GSM : CHAN_TAPS_DECT;
    // CIC impulse response: box of length R*M convolved five times
    h.delete();
    for (int i = 0; i < rm; i++) h.push_back(1);
    for (int st = 1; st < 5; st++) begin
      tmp.delete();
      for (int i = 0; i < h.size() + rm - 1; i++) tmp.push_back(0);
      for (int i = 0; i < h.size(); i++)
        for (int j = 0; j < rm; j++) tmp[i+j] += h[i];
      h = tmp;
    end
    nc = x.size() / m;
    for (int c = 0; c < nc; c++) begin
      acc = 0;
      for (int k = 0; k < h.size(); k++)
        if ((c+1)*m - 1 - k >= 0) acc += h[k] * x[(c+1)*m - 1 - k];
      cic.push_back(acc);
    end
    for (int j = 0; j < (nc + 1) / 2; j++) begin
      acc = 0;
      for (int k = 0; k < ti; k++)
        if (2*j - k >= 0) acc += hcoef(s, 0, k) * cic[2*j-k];
      isv.push_back(rnd_sat(acc));
    end
    y.delete();
    for (int j = 0; j < (isv.size() + 1) / 2; j++) begin
      acc = 0;
      for (int k = 0; k < tc; k++)
        if (2*j - k >= 0) acc += hcoef(s, 1, k) * isv[2*j-k];
      y.push_back(rnd_sat(acc));
    end
  endtask

  localparam int COS [4] = '{1, 0, -1, 0};
  localparam int SIN [4] = '{0, 1, 0, -1};

  // One segment in standard s: nbits bitstream samples, then compare.
  task automatic segment(input std_e s, input int nbits, input real f_off, input bit const_one);
    longint xi [$], xq [$], yi [$], yq [$];
    real fs, ph, u;
    int osr, nexp, spacing_bad, strt, big;
    bit b;
    fs  = (s == STD_GSM) ? 4.0 * 13.0e6 / 3.0 : 4.0 * 55.296e6 / 3.0;
    osr = (s == STD_GSM) ? OSR_GSM : OSR_DECT;
    // switch: the flush happens in the cycle after std_sel changes
    @(negedge clk);
    if (std_sel != s) n_switch++;
    std_sel = s; in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (std_active != s) begin failures++; $display("std_active not updated"); end
    got_i.delete(); got_q.delete(); got_t.delete();
    strt = n_out;
    x1 = '{0.0, 0.0}; x2 = '{0.0, 0.0};
    for (int n = 0; n < nbits; n++) begin
      ph = 2.0 * 3.14159265358979 * (0.75 + f_off / fs) * n;
      u = 0.4 * $cos(ph);
      b = const_one ? 1'b1 : sdm_step(n, u);
      in_valid = 1'b1; in_bit = b;
      xi.push_back(longint'((b ? 1 : -1) * COS[n % 4]));
      xq.push_back(longint'((b ? 1 : -1) * SIN[n % 4]));
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (80) @(negedge clk);
    ref_chain(s, xi, yi);
    ref_chain(s, xq, yq);
    nexp = nbits / osr;
    checks++;
    if (got_i.size() != nexp) begin
      failures++;
      $display("%s: expected %0d outputs, got %0d", s.name(), nexp, got_i.size());
    end
    spacing_bad = 0; big = 0;
    for (int m = 0; m < nexp && m < got_i.size(); m++) begin
      checks += 2;
      if (got_i[m] != yi[m]) begin
        failures++;
        if (failures < 10) $display("%s I m=%0d exp %0d got %0d", s.name(), m, yi[m], got_i[m]);
      end
      if (got_q[m] != yq[m]) begin
        failures++;
        if (failures < 10) $display("%s Q m=%0d exp %0d got %0d", s.name(), m, yq[m], got_q[m]);
      end
      if (m > 0) begin
        checks++;
        if (got_t[m] - got_t[m-1] != osr) spacing_bad++;
      end
      if (got_i[m] > 64'sd100000 || got_i[m] < -64'sd100000) big++;
    end
    failures += spacing_bad;
    checks++;
    if (!const_one && big == 0) begin failures++; $display("%s: tone not visible at the output", s.name()); end
    if (const_one) n_const++;
    $display("%s: %0d outputs, %0d above 1e5 in magnitude, last I=%0d Q=%0d",
             s.name(), got_i.size(), big, got_i[got_i.size()-1], got_q[got_q.size()-1]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    segment(STD_GSM,  64 * 160, 30.0e3, 0);
    segment(STD_DECT, 32 * 320, 200.0e3, 0);
    segment(STD_GSM,  64 * 60, 0.0, 1);
    segment(STD_DECT, 32 * 60, 0.0, 1);
    segment(STD_GSM,  64 * 60, 30.0e3, 0);
    $display("mechanisms: cic_decimations=%0d isinc_decimations=%0d outputs=%0d switches=%0d flushes=%0d constant_input_runs=%0d",
             n_cic, n_isinc, n_out, n_switch, n_flush, n_const);
    checks += 6;
    if (n_const == 0)  failures++;
    if (n_cic == 0)    failures++;
    if (n_isinc == 0)  failures++;
    if (n_out == 0)    failures++;
    if (n_switch == 0) failures++;
    if (n_flush != n_switch) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
