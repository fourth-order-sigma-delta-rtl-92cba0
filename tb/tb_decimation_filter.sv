// tb_decimation_filter: end-to-end test of the two-stage decimation filter
// at its default sizes, on a bit stream from a first-order sigma-delta loop
// written in the testbench (a 600 Hz sine of amplitude 0.6 at the 1024 kHz
// rate). Every 32 kHz intermediate word is compared with a direct
// convolution of the bit history with the fifth-order comb response; every
// 8 kHz output word with the 29-tap FIR applied to those reference words,
// rounded to Q1.15. Output spacing (32 and 128 clocks) is checked, as is the
// rough amplitude of the output, which should follow the sine.
`timescale 1ns/1ps
module tb_decimation_filter;
  import tb_ref_pkg::*;

  localparam int NOUT = 160;

  logic clk = 0, rst_n = 0, din_bit = 0;
  logic signed [26:0] mid_dout;
  logic mid_valid, out_valid, overflow;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;

  decimation_filter dut (.clk, .rst_n, .in_valid(1'b1), .din_bit,
                         .mid_dout, .mid_valid, .dout, .out_valid, .overflow);

  always #5 clk = ~clk;

  longint h [CIC_LEN];
  longint bits [CIC_LEN];
  longint mids [TAPS];
  longint cq [TAPS];
  longint mid_q [$];
  longint out_q [$];
  int n_in = 0, n_mid = 0, n_out = 0, cyc = 0;
  int last_mid = -1, last_out = -1;
  real integ = 0.0, peak = 0.0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(posedge clk) cyc <= cyc + 1;

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
      if (n_out > 20 && real'(dout) / 32768.0 > peak) peak = real'(dout) / 32768.0;
      n_out++;
    end
  end

  initial begin
    cic_impulse(h);
    foreach (cq[k]) cq[k] = fir_q(k);
    foreach (bits[i]) bits[i] = 0;
    foreach (mids[i]) mids[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (n_out < NOUT) begin
      real u;
      u = 0.6 * $sin(2.0 * 3.14159265358979 * 600.0 * real'(n_in) / 1024000.0);
      din_bit = (integ >= 0.0);
      integ += u - (din_bit ? 1.0 : -1.0);
      for (int i = CIC_LEN - 1; i > 0; i--) bits[i] = bits[i-1];
      bits[0] = din_bit ? 1 : -1;
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
      @(negedge clk);
    end
    // 600 Hz lies in the passband; expect roughly the input amplitude.
    checks++;
    if (peak < 0.5 || peak > 0.75) fail($sformatf("output peak %f, expected about 0.6", peak));
    $display("output peak %f for input amplitude 0.6", peak);
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
