// decimation_filter: the ADC's two-stage decimation filter, turning the
// modulator's 1024 kHz one-bit stream into 16-bit words at 8 kHz (overall
// decimation 128, the oversampling ratio).
//
// Stage 1 (cic_decimator) is the fifth-order comb filter decimating by 32 to
// 32 kHz; it needs no multiplier and suppresses the shaped quantisation noise
// around the multiples of 32 kHz. Stage 2 (fir_decimator) is the 29-tap
// linear-phase FIR low-pass decimating by 4 to 8 kHz, which sets the
// passband edge (about 3.5 kHz) and the 32 dB attenuation at 4 kHz.
//
// Interface: din_bit (1 = +1, 0 = -1) is taken when in_valid is high. dout is
// a signed Q1.15 fraction of the modulator's feedback reference, with
// out_valid pulsing once per 128 inputs; overflow flags a saturated word.
// mid_dout/mid_valid expose the 32 kHz stage-1 result (25 fractional bits).
//
// Timing: out_valid pulses FIR_TAPS + 2 clocks after the clock edge that takes
// every 128th input (one clock in stage 1, FIR_TAPS + 1 in stage 2).
// The split into two stages, their orders and factors follow the design;
// the word widths are this design's choices. rst_n also disables the
// assertion below while reset is held (lint reports that mixed use).
module decimation_filter
  import sd_adc_pkg::*;
#(
  parameter int unsigned N     = CIC_N,
  parameter int unsigned R     = CIC_R,
  parameter int unsigned M     = FIR_M,
  parameter int unsigned TAPS  = FIR_TAPS,
  parameter int unsigned OUT_W = ADC_OUT_W,
  parameter int unsigned MID_W = 2 + N * $clog2(R)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    din_bit,
  output logic signed [MID_W-1:0] mid_dout,
  output logic                    mid_valid,
  output logic signed [OUT_W-1:0] dout,
  output logic                    out_valid,
  output logic                    overflow
);

  logic fir_busy;

  cic_decimator #(.N(N), .R(R), .OUT_W(MID_W)) u_stage1 (
    .clk, .rst_n,
    .in_valid,
    .din_bit,
    .dout      (mid_dout),
    .out_valid (mid_valid)
  );

  fir_decimator #(
    .TAPS(TAPS), .M(M), .IN_W(MID_W), .IN_FRAC(N * $clog2(R)), .OUT_W(OUT_W)
  ) u_stage2 (
    .clk, .rst_n,
    .in_valid  (mid_valid),
    .din       (mid_dout),
    .dout,
    .out_valid,
    .overflow,
    .busy      (fir_busy)
  );

  // The serial FIR needs fewer clocks than there are between stage-1 outputs.
  a_fir_fits: assert property (@(posedge clk) disable iff (!rst_n) mid_valid |-> !fir_busy)
    else $error("decimation_filter: stage-2 sum still running at a new stage-1 output");

endmodule
