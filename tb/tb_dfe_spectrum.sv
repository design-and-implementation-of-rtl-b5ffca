// tb_dfe_spectrum: selectivity test of the GSM/DECT front-end at its default
// sizes, on the blocker and interferer offsets the standards specify.
//
// For each standard a behavioural 4th-order band-pass sigma-delta modulator
// (the same model as in tb_dfe_top) is fed one tone at 3fs/4 + offset,
// amplitude 0.4 of full scale. After the filters have settled, the RMS of
// the complex output (I, Q) is measured:
//   - a tone inside the channel (GSM 30 kHz, DECT 300 kHz) must come out at
//     0.4/2 * 2^20 (comb gain 2^20, FIR gain 1) within 1 dB;
//   - tones at the adjacent-channel interferer and blocker offsets
//     (GSM 0.2, 0.4, 0.6, 1.6, 3.0 MHz; DECT 1.7, 3.4, 5.2 MHz) must be at
//     least 20 dB (GSM) or 30 dB (DECT) below the in-channel tone.
// The thresholds are the stop-band attenuations the design targets (20 dB at
// 100 kHz for GSM, 33 dB at 800 kHz for DECT) less a margin for modulator
// noise. Output spacing of 64 / 32 clocks is checked on every run.
module tb_dfe_spectrum;
  import dfe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  std_e std_sel = STD_GSM;
  std_e std_active;
  logic out_valid;
  data_t i_out, q_out;
  int checks = 0, failures = 0;

  dfe_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural band-pass sigma-delta modulator (see tb_dfe_top)
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

  int   cycle = 0, last_t = -1, bad_spacing = 0, n_out = 0, skip = 0;
  real  pwr = 0.0;
  int   osr_now = 64;
  always @(posedge clk) begin
    cycle++;
    if (out_valid) begin
      if (last_t >= 0 && cycle - last_t != osr_now) bad_spacing++;
      last_t = cycle;
      if (skip > 0) skip--;
      else begin
        pwr += real'(i_out) * real'(i_out) + real'(q_out) * real'(q_out);
        n_out++;
      end
    end
  end

  // One tone run; returns output RMS of |I + jQ|.
  task automatic tone(input std_e s, input real f_off, output real rms);
    real fs, ph;
    int osr, nbits;
    fs  = (s == STD_GSM) ? 4.0 * 13.0e6 / 3.0 : 4.0 * 55.296e6 / 3.0;
    osr = (s == STD_GSM) ? OSR_GSM : OSR_DECT;
    // leave the standard for one cycle to flush the chain, then enter it
    @(negedge clk);
    in_valid = 1'b0;
    std_sel = (s == STD_GSM) ? STD_DECT : STD_GSM;
    @(negedge clk);
    std_sel = s;
    @(negedge clk);
    @(negedge clk);
    osr_now = osr; last_t = -1; pwr = 0.0; n_out = 0; skip = 40;
    x1 = '{0.0, 0.0}; x2 = '{0.0, 0.0};
    nbits = osr * 440;
    for (int n = 0; n < nbits; n++) begin
      ph = 2.0 * 3.14159265358979 * (0.75 + f_off / fs) * real'(n);
      in_valid = 1'b1;
      in_bit = sdm_step(n, 0.4 * $cos(ph));
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (2 * osr) @(negedge clk);
    rms = $sqrt(pwr / real'(n_out));
  endtask

  function automatic real db(input real a, input real b);
    return 20.0 * $log10(a / b);
  endfunction

  localparam real GSM_OFF [5]  = '{0.2e6, 0.4e6, 0.6e6, 1.6e6, 3.0e6};
  localparam real DECT_OFF [3] = '{1.7e6, 3.4e6, 5.2e6};

  initial begin
    real ref_rms, r, want;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    want = 0.2 * 1048576.0;        // |I + jQ| of the in-channel tone
    // GSM
    tone(STD_GSM, 30.0e3, ref_rms);
    $display("GSM  in-channel 30 kHz: rms %0.0f (%0.2f dB from ideal)", ref_rms, db(ref_rms, want));
    checks++;
    if (db(ref_rms, want) > 1.0 || db(ref_rms, want) < -1.0) failures++;
    foreach (GSM_OFF[k]) begin
      tone(STD_GSM, GSM_OFF[k], r);
      $display("GSM  offset %0.1f MHz: %0.1f dB", GSM_OFF[k] / 1.0e6, db(r, ref_rms));
      checks++;
      if (db(r, ref_rms) > -20.0) failures++;
    end
    // DECT
    tone(STD_DECT, 300.0e3, ref_rms);
    $display("DECT in-channel 300 kHz: rms %0.0f (%0.2f dB from ideal)", ref_rms, db(ref_rms, want));
    checks++;
    if (db(ref_rms, want) > 1.0 || db(ref_rms, want) < -1.0) failures++;
    foreach (DECT_OFF[k]) begin
      tone(STD_DECT, DECT_OFF[k], r);
      $display("DECT offset %0.1f MHz: %0.1f dB", DECT_OFF[k] / 1.0e6, db(r, ref_rms));
      checks++;
      if (db(r, ref_rms) > -30.0) failures++;
    end
    checks++;
    if (bad_spacing != 0) begin failures++; $display("output spacing wrong %0d times", bad_spacing); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
