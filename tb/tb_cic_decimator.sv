// tb_cic_decimator: self-checking test of the fifth-order, decimate-by-32
// comb stage. A pseudo-random bit stream with slowly changing density (and
// random gaps in in_valid) is applied; every output word is compared with a
// direct convolution of the input history with the (sum z^-k)^5 impulse
// response, taken at every 32nd accepted input. The test also checks that
// out_valid comes exactly one clock after the 32nd input and never otherwise.
`timescale 1ns/1ps
module tb_cic_decimator;
  import tb_ref_pkg::*;

  localparam int W = 27;
  localparam int NOUT = 300;

  logic clk = 0, rst_n = 0, in_valid = 0, din_bit = 0;
  logic signed [W-1:0] dout;
  logic out_valid;
  int checks = 0, failures = 0;

  cic_decimator dut (.clk, .rst_n, .in_valid, .din_bit, .dout, .out_valid);

  always #5 clk = ~clk;

  longint h [CIC_LEN];
  longint hist [CIC_LEN];     // hist[0] = newest accepted input (+1/-1)
  int n_in = 0, n_out = 0, n_full_pos = 0, n_full_neg = 0;
  longint expected;
  bit expect_out = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    cic_impulse(h);
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_out < NOUT) begin
      @(negedge clk);
      // Check the output registered at the last rising edge.
      checks++;
      if (out_valid !== expect_out) fail($sformatf("out_valid=%0d expected %0d at input %0d", out_valid, expect_out, n_in));
      if (out_valid) begin
        checks++;
        if (longint'(dout) != expected)
          fail($sformatf("output %0d: got %0d expected %0d", n_out, dout, expected));
        if (longint'(dout) == (longint'(1) << 25)) n_full_pos++;
        if (longint'(dout) == -(longint'(1) << 25)) n_full_neg++;
        n_out++;
      end
      expect_out = 0;
      // Drive the next input.
      in_valid = ($urandom_range(0, 7) != 0);
      begin
        int dens;
        dens = 128 + int'(100.0 * $sin(real'(n_in) / 700.0));
        // Full-scale stretches: all +1, then all -1.
        if (n_in >= 4000 && n_in < 4400) dens = 256;
        if (n_in >= 4400 && n_in < 4800) dens = 0;
        din_bit = ($urandom_range(0, 255) < dens);
      end
      if (in_valid) begin
        for (int i = CIC_LEN - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = din_bit ? 1 : -1;
        n_in++;
        if (n_in % CIC_R == 0) begin
          expected = 0;
          for (int i = 0; i < CIC_LEN; i++) expected += h[i] * hist[i];
          expect_out = 1;
        end
      end
    end
    checks += 2;
    if (n_full_pos == 0) fail("output never reached +32^5");
    if (n_full_neg == 0) fail("output never reached -32^5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * CIC_R * NOUT) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
