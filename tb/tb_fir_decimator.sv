// tb_fir_decimator: self-checking test of the 29-tap, decimate-by-4 FIR
// stage at its default sizes. Input samples (27 bits, 25 fractional) arrive
// every 32 clocks as in the ADC: first pseudo-random values within +-0.9,
// then a band of full-scale steps that drive the output into saturation.
// Each output is compared with a direct convolution using the taps rounded
// to Q1.15 by the reference package, rounded and saturated the same way.
// The test also checks that an output comes for every 4th input only, exactly
// TAPS + 1 clocks after the edge that took that input, and that both
// unsaturated and saturated outputs (overflow flag) occurred.
`timescale 1ns/1ps
module tb_fir_decimator;
  import tb_ref_pkg::*;

  localparam int W = 27;
  localparam int GAP = 32;     // clocks between input samples
  localparam int NIN = 1200;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] din = '0;
  logic signed [15:0] dout;
  logic out_valid, overflow, busy;
  int checks = 0, failures = 0;
  int n_sat = 0, n_plain = 0;

  fir_decimator dut (.clk, .rst_n, .in_valid, .din, .dout, .out_valid, .overflow, .busy);

  always #5 clk = ~clk;

  longint hist [TAPS];
  longint cq [TAPS];
  longint exp_q [$];
  bit     exp_sat [$];
  int     due [$];      // cycle at which each output must appear
  int     cyc = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // Output monitor.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks += 3;
      if (due.size() == 0) fail("unexpected out_valid");
      else begin
        int d; longint e; bit s;
        d = due.pop_front(); e = exp_q.pop_front(); s = exp_sat.pop_front();
        if (cyc != d) fail($sformatf("output at cycle %0d, expected %0d", cyc, d));
        if (longint'(dout) != e) fail($sformatf("dout=%0d expected %0d", dout, e));
        if (overflow != s) fail($sformatf("overflow=%0d expected %0d", overflow, s));
        if (s) n_sat++; else n_plain++;
      end
    end else if (due.size() != 0 && cyc > due[0]) begin
      checks++;
      fail($sformatf("missing output due at %0d", due[0]));
      void'(due.pop_front()); void'(exp_q.pop_front()); void'(exp_sat.pop_front());
    end
  end

  initial begin
    foreach (cq[k]) cq[k] = fir_q(k);
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NIN; n++) begin
      longint x;
      if (n >= 800 && n < 1000)
        x = ((n / 40) % 2 == 0) ? (longint'(1) << 25) : -(longint'(1) << 25);
      else
        x = longint'($urandom_range(0, 60000000)) - 30000000;
      @(negedge clk);
      in_valid = 1;
      din = W'(x);
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = x;
      if (n % 4 == 3) begin
        longint acc; bit s;
        acc = 0;
        for (int k = 0; k < TAPS; k++) acc += cq[k] * hist[k];
        exp_q.push_back(to_q15(acc, s));
        exp_sat.push_back(s);
        // The edge after this negedge takes the sample (cycle cyc+1 there);
        // the output is seen TAPS + 1 edges later.
        due.push_back(cyc + 1 + TAPS);
      end
      @(negedge clk);
      in_valid = 0;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (2 * GAP) @(negedge clk);
    checks += 3;
    if (due.size() != 0) fail($sformatf("%0d outputs never came", due.size()));
    if (n_sat == 0) fail("saturation never happened");
    if (n_plain == 0) fail("no unsaturated output");
    $display("outputs: %0d plain, %0d saturated", n_plain, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (GAP * NIN + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
