// tb_ref_pkg: reference arithmetic for the decimation-filter testbenches,
// written independently of the RTL.
//
// - cic_impulse(): impulse response of (sum_{k=0}^{R-1} z^-k)^N, built by
//   convolving N boxcars (R^N times the first-stage filter's response).
// - fir_q(): the 29 FIR taps, listed in full, rounded to Q1.15.
// - cic_ref()/fir_ref(): direct convolutions over a sample history, with the
//   output rounding (half up, arithmetic shift) and saturation of the RTL's
//   output format.
package tb_ref_pkg;

  localparam int CIC_N = 5;
  localparam int CIC_R = 32;
  localparam int CIC_LEN = CIC_N * (CIC_R - 1) + 1;   // 156 taps
  localparam int TAPS = 29;

  localparam real FIR_REAL [TAPS] = '{
    -0.00010366, 0.025681, 0.036558, 0.046984, 0.044636, 0.025977,
    -0.0050503, -0.036724, -0.052988, -0.040025, 0.0068879, 0.079656,
     0.15873, 0.21972, 0.24261,
     0.21972, 0.15873, 0.079656, 0.0068879, -0.040025, -0.052988,
    -0.036724, -0.0050503, 0.025977, 0.044636, 0.046984, 0.036558,
     0.025681, -0.00010366
  };

  function automatic void cic_impulse(output longint h [CIC_LEN]);
    longint t [CIC_LEN];
    for (int i = 0; i < CIC_LEN; i++) h[i] = (i == 0) ? 1 : 0;
    for (int s = 0; s < CIC_N; s++) begin
      for (int i = 0; i < CIC_LEN; i++) begin
        t[i] = 0;
        for (int j = 0; j < CIC_R; j++) if (i - j >= 0) t[i] += h[i-j];
      end
      h = t;
    end
  endfunction

  function automatic longint fir_q(int k);
    real s;
    s = FIR_REAL[k] * 32768.0;
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  // Round a sum with 40 fractional bits to Q1.15 with saturation.
  function automatic longint to_q15(longint acc, output bit sat);
    longint r;
    r = (acc + (longint'(1) << 24)) >>> 25;
    sat = 0;
    if (r > 32767)  begin r = 32767;  sat = 1; end
    if (r < -32768) begin r = -32768; sat = 1; end
    return r;
  endfunction

endpackage
