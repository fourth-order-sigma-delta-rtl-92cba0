// cic_decimator: first decimation stage, a fifth-order comb (sinc^5) filter
//
//   H1(z) = (1/R^N) * ((1 - z^-R) / (1 - z^-1))^N,   N = 5, R = 32
//
// built as a running-sum (Hogenauer) decimator without multipliers: N
// integrators run at the input rate on the modulator's one-bit stream,
// every R-th integrator result is taken, and N combs (first differences)
// run at the output rate. Two's-complement wrap-around in the integrators is
// harmless because the width holds the full gain R^N of the filter.
//
// Interface: din_bit is the modulator's decision (1 = +1, 0 = -1), taken when
// in_valid is high (every clock of the 1024 kHz clock in the ADC). dout is a
// signed OUT_W-bit word whose value is R^N times the filter output, so it
// reads as a fixed-point number with N*log2(R) = 25 fractional bits (the 1/R^N
// of H1 is a pure scaling); out_valid pulses for one clock each R inputs.
//
// Timing: the integrators update on the clock of each accepted input; on the
// R-th input the last integrator's new value is sampled and passed through the
// comb pipeline, and dout/out_valid appear one clock after that input's
// clock edge (the combs are computed combinationally from the sampled value
// and registered once). The decimation phase counter starts at 0 after reset.
//
// The transfer function and the multiplier-free running-sum structure follow
// the design; register widths, the reset and the timing are this design's
// choices.
module cic_decimator #(
  parameter int unsigned N     = 5,
  parameter int unsigned R     = 32,
  parameter int unsigned OUT_W = 2 + N * $clog2(R)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    din_bit,
  output logic signed [OUT_W-1:0] dout,
  output logic                    out_valid
);

  typedef logic signed [OUT_W-1:0] acc_t;

  acc_t integ [N];          // integrator states
  acc_t comb_dly [N];       // comb delay elements (one output-rate sample)
  acc_t comb_val [N+1];     // comb chain, combinational
  logic [$clog2(R)-1:0] phase;

  wire acc_t din_s = din_bit ? acc_t'(1) : acc_t'(-1);

  // Values the integrators take at this clock edge.
  acc_t integ_next [N];
  always_comb begin
    integ_next[0] = integ[0] + din_s;
    for (int i = 1; i < N; i++) integ_next[i] = integ[i] + integ_next[i-1];
  end

  always_comb begin
    comb_val[0] = integ_next[N-1];
    for (int i = 0; i < N; i++) comb_val[i+1] = comb_val[i] - comb_dly[i];
  end

  wire last = in_valid && (phase == ($clog2(R))'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        integ[i]    <= '0;
        comb_dly[i] <= '0;
      end
      phase     <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < N; i++) integ[i] <= integ_next[i];
        phase <= last ? '0 : phase + 1'b1;
      end
      if (last) begin
        for (int i = 0; i < N; i++) comb_dly[i] <= comb_val[i];
        dout      <= comb_val[N];
        out_valid <= 1'b1;
      end
    end
  end

endmodule
