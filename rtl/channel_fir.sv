// channel_fir: last filter stage - sharp channel-select FIR that removes the
// remaining adjacent-channel energy and decimates by 2 to the final rate.
//
// GSM: 48 taps (order 47), input 541.7 kS/s, pass band 82 kHz, transition
// 82..100 kHz, output 270.833 kS/s (the symbol rate). DECT: 32 taps
// (order 31), input 4.608 MS/s, pass band 574 kHz, transition 574..800 kHz,
// output 2.304 MS/s (twice the symbol rate). Orders and band edges follow the
// design's specification; the coefficient values (dfe_coef_pkg) are this
// design's own least-squares fit.
//
// Structure: a poly_mac_fir (two MAC branches) plus the coefficient ROM,
// which holds both standards' tables and is addressed by std_sel and the tap
// index of each branch. Timing as poly_mac_fir: out_valid pulses T/2 + 2
// cycles after every second input sample (x[0], x[2], ... after clr). Change
// std_sel only together with clr.
module channel_fir
  import dfe_pkg::*;
  import dfe_coef_pkg::*;
#(
  parameter int unsigned MAX_TAPS = 48,
  localparam int unsigned TAP_W   = $clog2(MAX_TAPS + 1),
  localparam int unsigned BR_W    = $clog2(MAX_TAPS / 2 + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  std_e  std_sel,
  input  logic  in_valid,
  input  data_t in_data,
  output logic  out_valid,
  output data_t out_data
);

  logic [TAP_W-1:0] ntaps;
  logic [BR_W-1:0]  idx_a, idx_b;
  coef_t            coef_a, coef_b;

  assign ntaps = (std_sel == STD_GSM) ? TAP_W'(CHAN_TAPS_GSM) : TAP_W'(CHAN_TAPS_DECT);

  // Coefficient ROM: both tables, selected by the standard.
  function automatic coef_t rom(input std_e s, input logic [BR_W:0] i);
    coef_t c;
    c = '0;
    if (s == STD_GSM) begin
      if (int'(i) < CHAN_TAPS_GSM) c = FIR_GSM[i[$clog2(CHAN_TAPS_GSM)-1:0]];
    end else begin
      if (int'(i) < CHAN_TAPS_DECT) c = FIR_DECT[i[$clog2(CHAN_TAPS_DECT)-1:0]];
    end
    return c;
  endfunction

  // Branch index j reads h[2j] (odd-numbered) and h[2j+1] (even-numbered).
  assign coef_a = rom(std_sel, {idx_a, 1'b0});
  assign coef_b = rom(std_sel, {idx_b, 1'b1});

  poly_mac_fir #(
    .DATA_W_P(DATA_W), .COEF_W_P(COEF_W), .COEF_FR(COEF_FRAC), .MAX_TAPS(MAX_TAPS)
  ) u_fir (
    .clk, .rst_n, .clr, .ntaps,
    .in_valid, .in_data,
    .coef_idx_a(idx_a), .coef_a,
    .coef_idx_b(idx_b), .coef_b,
    .out_valid, .out_data
  );

endmodule
