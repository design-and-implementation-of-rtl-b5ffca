// dfe_coef_pkg: coefficient tables of the two FIR stages, for GSM and DECT.
//
// Each table holds h[0..T-1] of a linear-phase (symmetric, even-length) FIR
// as signed 16-bit words with 15 fractional bits, h = round(32768 * h_real).
// The filter orders (23 / 15 for the inverse-sinc stage, 47 / 31 for the
// channel stage) and band edges follow the design's specification; the
// coefficient values are this design's own. |Hcic(f)| below is the
// normalised comb droop |sin(pi f R M / fs) / (R M sin(pi f / fs))|^5 at the
// comb's input rate fs; grids are 3000 points over 0..fin/2.
//
//   ISINC_*: weighted least squares, pass band 0..fp with target
//            1/|Hcic(f)| (weight 1), stop band fin/2 - fp .. fin/2 (weight 10),
//            the band that folds onto the channel after decimation by 2.
//   FIR_*:   minimax fit (Lawson's iteratively reweighted least squares, 300
//            iterations), pass band 0..fp with target 1/(|Hcic| |Hisinc|), so
//            it also flattens what the inverse-sinc stage leaves, stop band
//            from fst; stop weight 0.005 (GSM) or 1.2 (DECT).
//
//   GSM : fin = 1083.333 / 541.667 kHz, fp = 82 kHz, fst = 100 kHz
//   DECT: fin = 9216 / 4608 kHz,        fp = 574 kHz, fst = 800 kHz
//
// Result after quantisation, whole chain (comb x inverse sinc x channel):
//   GSM : pass-band ripple 0.09 dB p-p, channel stop band -22.9 dB,
//         inverse-sinc stop band -91 dB
//   DECT: pass-band ripple 0.38 dB p-p, channel stop band -33.8 dB,
//         inverse-sinc stop band -90 dB
package dfe_coef_pkg;

  import dfe_pkg::*;

  localparam coef_t ISINC_GSM [24] = '{
        -4,     -5,     42,     52,   -222,   -292,    771,   1147,
     -2018,  -3844,   4277,  16480,  16480,   4277,  -3844,  -2018,
      1147,    771,   -292,   -222,     52,     42,     -5,     -4
  };

  localparam coef_t FIR_GSM [48] = '{
       128,    428,   -861,     63,    310,    348,     15,   -382,
      -422,     20,    542,    546,   -103,   -801,   -723,    264,
      1248,   1021,   -609,  -2230,  -1749,   1766,   6924,  10723,
     10723,   6924,   1766,  -1749,  -2230,   -609,   1021,   1248,
       264,   -723,   -801,   -103,    546,    542,     20,   -422,
      -382,     15,    348,    310,     63,   -861,    428,    128
  };

  localparam coef_t ISINC_DECT [16] = '{
      -152,   -258,   1061,   2215,  -3038,  -9273,   1978,  23851,
     23851,   1978,  -9273,  -3038,   2215,   1061,   -258,   -152
  };

  localparam coef_t FIR_DECT [32] = '{
       364,    428,    -76,   -291,   -609,   -224,    383,    976,
       756,   -268,  -1564,  -1895,   -384,   2942,   6805,   9399,
      9399,   6805,   2942,   -384,  -1895,  -1564,   -268,    756,
       976,    383,   -224,   -609,   -291,    -76,    428,    364
  };

endpackage
