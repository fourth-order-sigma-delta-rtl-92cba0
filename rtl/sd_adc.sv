// sd_adc: fourth-order sigma-delta A/D converter for voice band, with a
// fifth-order comb plus FIR decimation filter.
//
// The modulator samples its input at 1024 kHz (128 times the 8 kHz output
// rate, for a 3.6 kHz passband) and produces a one-bit stream whose
// quantisation noise is pushed out of the passband by a fourth-order loop
// filter. The decimation filter removes that noise and lowers the rate in two
// steps, 1024 -> 32 kHz and 32 -> 8 kHz, producing 16-bit words.
//
// The modulator is analog in silicon; sd_modulator4 is its behavioural model
// (real-valued), so this top is for simulation. decimation_filter is the
// synthesizable digital part. The anti-aliasing filter ahead of the modulator
// is continuous-time and not modelled: ain is its sampled output.
//
// Interface: clk is the 1024 kHz sampling clock, rst_n an active-low
// asynchronous reset. ain is the input voltage relative to the modulator's
// reference (keep it within +-0.4). bitstream is the modulator output,
// mid_dout/mid_valid the 32 kHz intermediate result, and dout/out_valid the
// 8 kHz Q1.15 output word, one every 128 clocks; overflow flags a saturated
// output word. An elaboration check requires the two decimation factors to
// multiply to the oversampling ratio.
module sd_adc
  import sd_adc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  real                        ain,
  output logic                       bitstream,
  output logic signed [CIC_W-1:0]    mid_dout,
  output logic                       mid_valid,
  output logic signed [ADC_OUT_W-1:0] dout,
  output logic                       out_valid,
  output logic                       overflow
);

  // The two decimation factors must make up the oversampling ratio.
  if (CIC_R * FIR_M != OSR) begin : g_rate_check
    $error("sd_adc: CIC_R * FIR_M must equal OSR");
  end

  sd_modulator4 u_modulator (
    .clk, .rst_n,
    .ain,
    .bitstream
  );

  decimation_filter u_decimator (
    .clk, .rst_n,
    .in_valid (1'b1),
    .din_bit  (bitstream),
    .mid_dout,
    .mid_valid,
    .dout,
    .out_valid,
    .overflow
  );

endmodule
