// dfe_pkg: types and constants shared by the GSM/DECT digital front-end.
//
// The front-end serves two radio standards with one datapath. The standard is
// chosen at run time with std_e; the sizes below follow the design's
// specification: a 5th-order comb (CIC) decimator with 16x (GSM) or 8x (DECT)
// decimation, differential delay 1 (GSM) or 2 (DECT), 24-bit data after the
// comb and two polyphase MAC FIR stages that each decimate by 2.
// The down-converter's 4-bit output words also follow the specification, and
// with them the comb's register width comes to 24 bits. The coefficient word
// (16 bit, 15 fractional bits) and the coding of the 1-bit bitstream as +1/-1
// are this implementation's own choices.
package dfe_pkg;

  // Radio standard selected for the whole chain.
  typedef enum logic {
    STD_GSM  = 1'b0,
    STD_DECT = 1'b1
  } std_e;

  // Comb (CIC) decimator
  localparam int unsigned CIC_N      = 5;   // number of integrator / comb stages
  localparam int unsigned CIC_M_GSM  = 16;  // decimation ratio, GSM
  localparam int unsigned CIC_R_GSM  = 1;   // differential delay, GSM
  localparam int unsigned CIC_M_DECT = 8;   // decimation ratio, DECT
  localparam int unsigned CIC_R_DECT = 2;   // differential delay, DECT
  localparam int unsigned CIC_IN_W   = 4;   // 4-bit mux output: +1 / 0 / -1
  // Register width N*log2(R*M) + B_in = 5*4 + 4 = 24; R*M = 16 for both
  // standards, so one width serves both.
  localparam int unsigned CIC_REG_W  = CIC_N * 4 + CIC_IN_W;

  // FIR stages
  localparam int unsigned DATA_W     = 24;  // datapath width after the comb
  localparam int unsigned COEF_W     = 16;  // coefficient width
  localparam int unsigned COEF_FRAC  = 15;  // coefficient fractional bits

  // Filter lengths (taps = order + 1)
  localparam int unsigned ISINC_TAPS_GSM  = 24;
  localparam int unsigned ISINC_TAPS_DECT = 16;
  localparam int unsigned CHAN_TAPS_GSM   = 48;
  localparam int unsigned CHAN_TAPS_DECT  = 32;

  // Overall decimation: clock cycles (input samples) per output sample.
  localparam int unsigned OSR_GSM  = 64;
  localparam int unsigned OSR_DECT = 32;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [DATA_W-1:0] data_t;

endpackage
