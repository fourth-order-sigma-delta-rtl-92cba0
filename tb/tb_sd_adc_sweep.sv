// tb_sd_adc_sweep: input-amplitude sweep of the whole converter at its
// default sizes. The amplitudes are those of the converter's measured
// signal/noise table (0.09 to 0.5395 of the reference; larger ones drive the
// loop out of its stable range and are not run). For each, a 1 kHz sine runs
// for 50 ms after a reset; a least-squares fit over whole periods of the
// 8 kHz output gives the amplitude, which must be within 2 % of the input
// times the filter gain at 1 kHz (computed here from the real FIR taps and
// the comb droop), and the signal-to-noise ratio, which must exceed 65 dB.
// A last run puts a 6 kHz tone, in the FIR's stopband (above 0.14 of the
// 32 kHz rate), through the converter: its alias at 2 kHz must come out at
// least 30 dB below the input.
`timescale 1ns/1ps
module tb_sd_adc_sweep;
  import tb_ref_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  NOUT = 400;
  localparam int  SETTLE = 80;
  localparam int  NAMP = 8;
  localparam real AMPS [NAMP] = '{0.09, 0.1162, 0.1501, 0.1939, 0.2504, 0.3234, 0.4177, 0.5395};

  logic clk = 0, rst_n = 0;
  real  ain = 0.0;
  logic bitstream;
  logic signed [26:0] mid_dout;
  logic mid_valid, out_valid, overflow;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;

  sd_adc dut (.clk, .rst_n, .ain, .bitstream, .mid_dout, .mid_valid, .dout, .out_valid, .overflow);

  always #5 clk = ~clk;

  real y [$];
  always @(negedge clk) if (rst_n && out_valid) y.push_back(real'(dout) / 32768.0);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Gain of comb plus FIR at frequency f (Hz).
  function automatic real filter_gain(real f);
    real w, g, hr, hi;
    w = 2.0 * PI * f / 1024000.0;
    g = $pow($sin(32.0 * w / 2.0) / (32.0 * $sin(w / 2.0)), 5);
    hr = 0.0; hi = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      hr += FIR_REAL[k] * $cos(2.0 * PI * f / 32000.0 * k);
      hi -= FIR_REAL[k] * $sin(2.0 * PI * f / 32000.0 * k);
    end
    return (g < 0.0 ? -g : g) * $sqrt(hr * hr + hi * hi);
  endfunction

  // Run one tone of amplitude a and frequency f; fit the output at fout.
  task automatic run_tone(real a, real f, real fout, output real amp, output real snr);
    int n;
    real sa, sb, sc, ca, cb, cc, res, e;
    int len;
    y.delete();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 0;
    while (y.size() < NOUT) begin
      ain = a * $sin(2.0 * PI * f * real'(n) / 1024000.0);
      n++;
      @(negedge clk);
    end
    len = ((NOUT - SETTLE) / 8) * 8;
    sa = 0.0; sb = 0.0; sc = 0.0;
    for (int i = SETTLE; i < SETTLE + len; i++) begin
      sa += y[i] * $sin(2.0 * PI * fout * real'(i) / 8000.0);
      sb += y[i] * $cos(2.0 * PI * fout * real'(i) / 8000.0);
      sc += y[i];
    end
    ca = 2.0 * sa / len; cb = 2.0 * sb / len; cc = sc / len;
    amp = $sqrt(ca * ca + cb * cb);
    res = 0.0;
    for (int i = SETTLE; i < SETTLE + len; i++) begin
      e = y[i] - ca * $sin(2.0 * PI * fout * real'(i) / 8000.0)
               - cb * $cos(2.0 * PI * fout * real'(i) / 8000.0) - cc;
      res += e * e;
    end
    snr = 10.0 * $log10((amp * amp / 2.0) / (res / len + 1.0e-30));
  endtask

  initial begin
    real g, amp, snr;
    g = filter_gain(1000.0);
    $display("filter gain at 1 kHz: %f", g);
    $display("   input   output  expected   SNR(dB)");
    foreach (AMPS[i]) begin
      run_tone(AMPS[i], 1000.0, 1000.0, amp, snr);
      $display("  %6.4f   %6.4f   %6.4f   %6.1f", AMPS[i], amp, g * AMPS[i], snr);
      checks += 2;
      if (amp < 0.98 * g * AMPS[i] || amp > 1.02 * g * AMPS[i])
        fail($sformatf("amplitude %f for input %f", amp, AMPS[i]));
      if (snr < 65.0) fail($sformatf("SNR %0.1f dB for input %f", snr, AMPS[i]));
    end
    // Stopband tone: 6 kHz folds to 2 kHz at the 8 kHz output rate.
    run_tone(0.3, 6000.0, 2000.0, amp, snr);
    $display("6 kHz tone of 0.3: alias amplitude %f (%0.1f dB), expected %f",
             amp, 20.0 * $log10(amp / 0.3), 0.3 * filter_gain(6000.0));
    checks++;
    if (amp > 0.3 * $pow(10.0, -30.0 / 20.0)) fail("stopband tone not attenuated by 30 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NAMP + 1) * (128 * NOUT + 100)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
