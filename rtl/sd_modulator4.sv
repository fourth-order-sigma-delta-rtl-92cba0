// sd_modulator4: behavioural model (not synthesizable) of the fourth-order
// discrete-time sigma-delta modulator, which in silicon is a switched-
// capacitor circuit. It is here so that the digital decimation filter can be
// simulated on a realistic bit stream.
//
// Structure (from the modulator's block diagram, all values as given there):
//   x1 <- x1 + G1*(ain - y)            G1 = 0.2
//   x2 <- x2 + G2*x1                   G2 = 0.26
//   x3 <- x3 + G3*(x2 - B1*x4)         G3 = 0.26, B1 = 0.002 (resonator)
//   x4 <- x4 + G4*x3                   G4 = 0.26
//   v   = A1*x1 + A2*x2 + A3*x3 + A4*x4, A1..A4 = 2.6, 3.4, 3.2, 1
//   y   = +VREF if v >= 0, else -VREF   (one-bit quantiser)
// Every integrator is a delaying one, z^-1/(1-z^-1), so y at a sample depends
// only on the integrator states, which are updated at the clock edge from the
// states and the input sampled there. The resonator feedback B1 around the
// last two integrators puts a noise-transfer-function zero just above DC.
// Linearising the quantiser as a gain of 1.3 gives this loop the noise
// transfer function
//   NTF = (1 - 4z^-1 + 6.0001z^-2 - 4.0003z^-3 + 1.0001z^-4)
//       / (1 - 3.324z^-1 + 4.202z^-2 - 2.376z^-3 + 0.502z^-4),
// which is the design's NTF.
//
// Interface: ain is the sampled input voltage (the anti-aliasing filter's
// output); with VREF = 1 its peak-to-peak value must stay below 0.8 for the
// loop to remain stable. bitstream is the quantiser decision, 1 for +VREF and
// 0 for -VREF, valid during the clock cycle after the edge that updated the
// states. rst_n (active low, asynchronous) clears the integrators.
//
// The gains and the loop topology follow the design. The quantiser is drawn
// as a relay with unprinted thresholds; here it switches at 0 with no
// hysteresis. The reference VREF = 1 and the reset are this design's choices.
module sd_modulator4 #(
  parameter real G1   = 0.2,
  parameter real G2   = 0.26,
  parameter real G3   = 0.26,
  parameter real G4   = 0.26,
  parameter real B1   = 0.002,
  parameter real A1   = 2.6,
  parameter real A2   = 3.4,
  parameter real A3   = 3.2,
  parameter real A4   = 1.0,
  parameter real VREF = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  real  ain,
  output logic bitstream
);

  real x1, x2, x3, x4;   // integrator outputs
  real v;                // summing node ahead of the quantiser
  real yv;               // fed-back quantiser level

  always_comb begin
    v         = A1 * x1 + A2 * x2 + A3 * x3 + A4 * x4;
    bitstream = (v >= 0.0);
    yv        = bitstream ? VREF : -VREF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= 0.0;
      x2 <= 0.0;
      x3 <= 0.0;
      x4 <= 0.0;
    end else begin
      x1 <= x1 + G1 * (ain - yv);
      x2 <= x2 + G2 * x1;
      x3 <= x3 + G3 * (x2 - B1 * x4);
      x4 <= x4 + G4 * x3;
    end
  end

endmodule
