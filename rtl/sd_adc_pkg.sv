// sd_adc_pkg: constants shared by the fourth-order sigma-delta ADC and its
// two-stage decimation filter.
//
// The rates follow the design: the modulator samples at 1024 kHz with an
// oversampling ratio of 128; the first decimation stage (fifth-order comb)
// divides the rate by 32 down to 32 kHz, the second (29-tap equiripple FIR)
// by 4 down to the 8 kHz output rate, where words are 16 bits wide.
//
// The FIR coefficients are the design's real-valued equiripple taps
// (passband edge 0.11, stopband edge 0.14 of the 32 kHz rate, 3 dB ripple,
// 32 dB attenuation). Only the first half up to the centre tap is listed; the
// filter is symmetric. The function fir_coef() rounds them to signed
// COEF_W-bit integers with COEF_FRAC fractional bits (Q1.15 by default); the
// word length is this design's choice. Where the two halves of the printed
// list differ in the last digit, the value with more digits is used.
package sd_adc_pkg;

  localparam int unsigned OSR       = 128;  // oversampling ratio
  localparam int unsigned CIC_N     = 5;    // order of the first stage
  localparam int unsigned CIC_R     = 32;   // decimation of the first stage
  localparam int unsigned FIR_M     = 4;    // decimation of the second stage
  localparam int unsigned FIR_TAPS  = 29;   // taps of the second stage
  localparam int unsigned COEF_W    = 16;   // coefficient word
  localparam int unsigned COEF_FRAC = 15;   // fractional bits of a coefficient
  localparam int unsigned ADC_OUT_W = 16;   // output word

  // Full-precision width of the comb stage for a two-level (+1/-1) input:
  // 2 bits for the input plus N*log2(R) bits of growth.
  localparam int unsigned CIC_W = 2 + CIC_N * $clog2(CIC_R);

  // First half of the symmetric FIR impulse response, h[0] .. h[14] (centre).
  localparam int unsigned FIR_HALF = (FIR_TAPS + 1) / 2;
  localparam real FIR_H [FIR_HALF] = '{
    -0.00010366, 0.025681, 0.036558, 0.046984, 0.044636,
     0.025977,  -0.0050503, -0.036724, -0.052988, -0.040025,
     0.0068879,  0.079656, 0.15873, 0.21972, 0.24261
  };

  // Real value of tap k of the full 29-tap response.
  function automatic real fir_tap_real(input int k);
    return (k < FIR_HALF) ? FIR_H[k] : FIR_H[FIR_TAPS - 1 - k];
  endfunction

  // Tap k rounded to the nearest signed fixed-point coefficient.
  function automatic logic signed [COEF_W-1:0] fir_coef(input int k);
    real scaled;
    scaled = fir_tap_real(k) * real'(1 << COEF_FRAC);
    return COEF_W'((scaled >= 0.0) ? $rtoi(scaled + 0.5) : -$rtoi(-scaled + 0.5));
  endfunction

endpackage
