// decim_pkg: word lengths, rates and FIR coefficients shared by the
// sigma-delta decimation filter.
//
// The chain takes a 3-bit two's-complement sample stream at 32 Msps, filters
// and decimates it by D1 = 16 in a CIC filter and by D2 = 2 in an FIR filter,
// giving one OUT_W-bit sample per microsecond (1 Msps). The input width, the
// rates and the two decimation factors follow the specification; the number
// of CIC stages, the FIR length, the coefficient values and all word lengths
// are this design's own choices, made to meet the required response: 3 dB
// point at 500 kHz, passband ripple below 2 dB, stopband attenuation better
// than 50 dB.
//
// FIR_COEFS is a 31-tap linear-phase least-squares design at fs = 2 MHz whose
// target is 1/|H_cic(f)| from 0 to 420 kHz (droop compensation) and 0 from
// 640 kHz to 1 MHz, with equal band weights, scaled by 2^(COEF_W-1) = 8192
// and rounded to integers. Together with the 5-stage CIC it gives a 3 dB
// point of about 497 kHz, 0.05 dB passband ripple and more than 50 dB
// attenuation everywhere above 640 kHz (including the CIC sidelobes up to
// 16 MHz). The coefficients sum to 8174, a DC gain of 0.998.
package decim_pkg;

  // Rates and decimation factors
  localparam int unsigned D1      = 16;   // CIC decimation factor
  localparam int unsigned D2      = 2;    // FIR decimation factor
  localparam int unsigned CIC_N   = 5;    // integrator stages = comb stages

  // Word lengths
  localparam int unsigned IN_W    = 3;    // modulator sample width (signed)
  // Register growth of a CIC filter: N * log2(D1 * M), differential delay M = 1
  localparam int unsigned CIC_W   = IN_W + CIC_N * $clog2(D1);  // 23 bits
  localparam int unsigned FIR_TAPS = 31;
  localparam int unsigned COEF_W  = 14;   // signed coefficients, 1.13 format
  localparam int unsigned OUT_W   = 16;   // output sample width (signed)
  // Accumulator: CIC_W + COEF_W plus growth for sum |h| = 19926 < 2^15
  localparam int unsigned ACC_W   = CIC_W + COEF_W + 2;

  // Output scaling: the CIC gain is D1^CIC_N = 2^20 and the FIR gain is
  // 2^(COEF_W-1). Dropping OUT_SHIFT bits maps a full-scale DC input of -4
  // to -16384, leaving one bit of headroom for the FIR overshoot.
  localparam int unsigned OUT_SHIFT =
      CIC_N * $clog2(D1) + (COEF_W - 1) + (IN_W - 1) - (OUT_W - 2);  // 21

  typedef logic signed [IN_W-1:0]   in_sample_t;
  typedef logic signed [CIC_W-1:0]  cic_word_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [OUT_W-1:0]  out_sample_t;

  localparam coef_t FIR_COEFS [FIR_TAPS] = '{
    -14'sd11,   -14'sd26,   14'sd25,    14'sd66,    -14'sd62,   -14'sd130,
     14'sd144,   14'sd217,  -14'sd300,  -14'sd329,   14'sd589,   14'sd490,
    -14'sd1173, -14'sd907,   14'sd2833,  14'sd5322,  14'sd2833, -14'sd907,
    -14'sd1173,  14'sd490,   14'sd589,  -14'sd329,  -14'sd300,   14'sd217,
     14'sd144,  -14'sd130,  -14'sd62,    14'sd66,    14'sd25,   -14'sd26,
    -14'sd11
  };

endpackage
