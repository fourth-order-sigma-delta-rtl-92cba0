// tb_sd_adc: end-to-end test of the whole converter at its default sizes
// (no parameter overrides): a 1 kHz sine of amplitude 0.2 enters the
// modulator and 8 kHz 16-bit words leave the decimation filter.
//
// Checks:
//  - every 32 kHz intermediate word and every 8 kHz output word equals a
//    reference computed in the testbench from the modulator's bit stream
//    (direct convolution with the fifth-order comb response, then the 29-tap
//    FIR with Q1.15 taps, rounding and saturation);
//  - words come exactly every 32 and 128 clocks;
//  - after the filters have settled, the output is a sine of the input's
//    frequency: a least-squares fit over whole periods gives an amplitude
//    within 2 % of the input times the filter gain at that frequency
//    (comb droop ((sin(32w/2)/(32 sin(w/2)))^5 times the FIR's response
//    |sum h_k e^-jwk| from the real taps, 0.81 at 1 kHz, where the FIR's
//    3 dB passband ripple has a dip) and a signal-to-noise ratio above 70 dB.
//  - each mechanism happened: both quantiser levels, stage-1 and stage-2
//    decimation. Output saturation cannot be reached with an input inside
//    the stable range and is exercised by the FIR's own test.
`timescale 1ns/1ps
module tb_sd_adc;
  import tb_ref_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real AMP = 0.2;
  localparam real FIN = 1000.0;
  localparam int  NOUT = 400;       // 8 kHz words, 50 ms of signal
  localparam int  SETTLE = 80;      // words skipped before the sine fit

  logic clk = 0, rst_n = 0;
  real  ain = 0.0;
  logic bitstream;
  logic signed [26:0] mid_dout;
  logic mid_valid, out_valid, overflow;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;

  sd_adc dut (.clk, .rst_n, .ain, .bitstream, .mid_dout, .mid_valid, .dout, .out_valid, .overflow);

  always #5 clk = ~clk;   // stands for the 1024 kHz sampling clock

  longint h [CIC_LEN];
  longint bits [CIC_LEN];
  longint mids [TAPS];
  longint cq [TAPS];
  longint mid_q [$];
  longint out_q [$];
  real    y [$];
  int n_in = 0, n_mid = 0, n_out = 0, cyc = 0, n_sat = 0;
  int n_pos = 0, n_neg = 0;
  int last_mid = -1, last_out = -1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // Reference model fed from the modulator's decision at each rising edge.
  always @(posedge clk) if (rst_n) begin
    for (int i = CIC_LEN - 1; i > 0; i--) bits[i] = bits[i-1];
    bits[0] = bitstream ? 1 : -1;
    if (bitstream) n_pos++; else n_neg++;
    n_in++;
    if (n_in % 32 == 0) begin
      longint m;
      m = 0;
      for (int i = 0; i < CIC_LEN; i++) m += h[i] * bits[i];
      mid_q.push_back(m);
      for (int i = TAPS - 1; i > 0; i--) mids[i] = mids[i-1];
      mids[0] = m;
      if (n_in % 128 == 0) begin
        longint acc; bit s;
        acc = 0;
        for (int k = 0; k < TAPS; k++) acc += cq[k] * mids[k];
        out_q.push_back(to_q15(acc, s));
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (mid_valid) begin
      checks++;
      if (mid_q.size() == 0) fail("unexpected mid_valid");
      else begin
        longint e;
        e = mid_q.pop_front();
        if (longint'(mid_dout) != e) fail($sformatf("mid %0d: %0d expected %0d", n_mid, mid_dout, e));
      end
      if (last_mid >= 0) begin
        checks++;
        if (cyc - last_mid != 32) fail($sformatf("mid spacing %0d", cyc - last_mid));
      end
      last_mid = cyc;
      n_mid++;
    end
    if (out_valid) begin
      checks++;
      if (out_q.size() == 0) fail("unexpected out_valid");
      else begin
        longint e;
        e = out_q.pop_front();
        if (longint'(dout) != e) fail($sformatf("out %0d: %0d expected %0d", n_out, dout, e));
      end
      if (last_out >= 0) begin
        checks++;
        if (cyc - last_out != 128) fail($sformatf("out spacing %0d", cyc - last_out));
      end
      last_out = cyc;
      if (overflow) n_sat++;
      y.push_back(real'(dout) / 32768.0);
      n_out++;
    end
  end

  initial begin
    cic_impulse(h);
    foreach (cq[k]) cq[k] = fir_q(k);
    foreach (bits[i]) bits[i] = 0;
    foreach (mids[i]) mids[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_out < NOUT) begin
      // Input sampled at the next rising edge.
      ain = AMP * $sin(2.0 * PI * FIN * real'(n_in) / 1024000.0);
      @(negedge clk);
    end

    // Least-squares sine fit over whole periods (8 words per period at 8 kHz).
    begin
      int  n0, len;
      real sa, sb, sc, a, b, c, amp, res, e, snr, g, hr, hi, w;
      // Expected gain of the two filter stages at FIN.
      w = 2.0 * PI * FIN / 1024000.0;
      g = $pow($sin(32.0 * w / 2.0) / (32.0 * $sin(w / 2.0)), 5);
      hr = 0.0; hi = 0.0;
      for (int k = 0; k < TAPS; k++) begin
        hr += FIR_REAL[k] * $cos(2.0 * PI * FIN / 32000.0 * k);
        hi -= FIR_REAL[k] * $sin(2.0 * PI * FIN / 32000.0 * k);
      end
      g = g * $sqrt(hr * hr + hi * hi);
      n0 = SETTLE; len = ((NOUT - SETTLE) / 8) * 8;
      sa = 0.0; sb = 0.0; sc = 0.0;
      for (int i = n0; i < n0 + len; i++) begin
        sa += y[i] * $sin(2.0 * PI * FIN * real'(i) / 8000.0);
        sb += y[i] * $cos(2.0 * PI * FIN * real'(i) / 8000.0);
        sc += y[i];
      end
      a = 2.0 * sa / len; b = 2.0 * sb / len; c = sc / len;
      amp = $sqrt(a * a + b * b);
      res = 0.0;
      for (int i = n0; i < n0 + len; i++) begin
        e = y[i] - a * $sin(2.0 * PI * FIN * real'(i) / 8000.0)
                 - b * $cos(2.0 * PI * FIN * real'(i) / 8000.0) - c;
        res += e * e;
      end
      res = res / len;
      snr = 10.0 * $log10((amp * amp / 2.0) / (res + 1.0e-30));
      $display("fitted amplitude %f (input %f, expected %f), offset %f, SNR %0.1f dB", amp, AMP, g * AMP, c, snr);
      checks += 2;
      if (amp < 0.98 * g * AMP || amp > 1.02 * g * AMP) fail($sformatf("amplitude %f", amp));
      if (snr < 70.0) fail($sformatf("SNR %0.1f dB", snr));
    end

    $display("mechanisms: +1 decisions %0d, -1 decisions %0d, stage-1 words %0d, stage-2 words %0d, saturated %0d",
             n_pos, n_neg, n_mid, n_out, n_sat);
    checks += 4;
    if (n_pos == 0) fail("quantiser never gave +1");
    if (n_neg == 0) fail("quantiser never gave -1");
    if (n_mid == 0) fail("no stage-1 word");
    if (n_out == 0) fail("no stage-2 word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (128 * NOUT + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
