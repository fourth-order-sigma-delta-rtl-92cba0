// tb_sd_modulator4: checks the behavioural fourth-order modulator.
//  1. DC inputs from -0.35 to +0.35: the mean of the +-1 bit stream over
//     16384 samples must equal the input within 0.002 (a sigma-delta loop
//     tracks its input on average), and no run of equal bits may exceed 64
//     (the loop stays stable inside the allowed input range).
//  2. Noise shaping: with a 0 input, the bit stream filtered by a 256-sample
//     moving average (a crude low-pass) must stay far closer to 0 than the
//     raw +-1 stream: |avg| < 0.01.
//  3. A 1 kHz sine of amplitude 0.3: the 128-sample moving average follows
//     the sine, delayed by half the window, to within 0.05.
`timescale 1ns/1ps
module tb_sd_modulator4;
  logic clk = 0, rst_n = 0;
  real  ain = 0.0;
  logic bitstream;
  int checks = 0, failures = 0;

  sd_modulator4 dut (.clk, .rst_n, .ain, .bitstream);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  localparam real PI = 3.14159265358979;
  real dc_levels [7] = '{-0.35, -0.2, -0.05, 0.0, 0.1, 0.25, 0.35};
  real win [$];
  int  ones, runlen, maxrun;
  logic prev;

  initial begin
    // 1. DC tracking and stability.
    foreach (dc_levels[i]) begin
      real mean;
      ain = dc_levels[i];
      do_reset();
      repeat (2000) @(negedge clk);
      ones = 0; runlen = 0; maxrun = 0; prev = bitstream;
      for (int n = 0; n < 16384; n++) begin
        @(negedge clk);
        ones += bitstream;
        runlen = (bitstream == prev) ? runlen + 1 : 1;
        if (runlen > maxrun) maxrun = runlen;
        prev = bitstream;
      end
      mean = (2.0 * ones - 16384.0) / 16384.0;
      checks += 2;
      if (mean - ain > 0.002 || ain - mean > 0.002)
        fail($sformatf("DC %f: bit-stream mean %f", ain, mean));
      if (maxrun > 64) fail($sformatf("DC %f: run of %0d equal bits", ain, maxrun));
      $display("DC %6.3f -> mean %8.5f, longest run %0d", ain, mean, maxrun);
    end

    // 2. Noise shaping around DC.
    ain = 0.0;
    do_reset();
    repeat (2000) @(negedge clk);
    win.delete();
    begin
      real s, worst;
      s = 0.0; worst = 0.0;
      for (int n = 0; n < 8192; n++) begin
        real b;
        @(negedge clk);
        b = bitstream ? 1.0 : -1.0;
        win.push_back(b); s += b;
        if (win.size() > 256) s -= win.pop_front();
        if (win.size() == 256 && (s / 256.0 > worst || -s / 256.0 > worst)) worst = (s >= 0.0) ? s / 256.0 : -s / 256.0;
      end
      checks++;
      if (worst >= 0.01) fail($sformatf("256-average of a 0 input reaches %f", worst));
      $display("zero input: worst 256-sample average %f", worst);
    end

    // 3. Sine tracking.
    do_reset();
    win.delete();
    begin
      real s, err, worst;
      s = 0.0; worst = 0.0;
      for (int n = 0; n < 8192; n++) begin
        real b;
        ain = 0.3 * $sin(2.0 * PI * 1000.0 * real'(n) / 1024000.0);
        @(negedge clk);
        b = bitstream ? 1.0 : -1.0;
        win.push_back(b); s += b;
        if (win.size() > 128) s -= win.pop_front();
        if (n > 2000) begin
          // The window average equals the input 64.5 samples earlier, up to
          // the loop delay and shaped noise.
          err = s / 128.0 - 0.3 * $sin(2.0 * PI * 1000.0 * (real'(n) - 65.5) / 1024000.0);
          if (err > worst || -err > worst) worst = (err >= 0.0) ? err : -err;
        end
      end
      checks++;
      if (worst > 0.05) fail($sformatf("sine tracking error %f", worst));
      $display("sine input: worst tracking error %f", worst);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
