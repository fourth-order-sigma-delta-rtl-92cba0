// fir_decimator: second decimation stage, a 29-tap linear-phase equiripple
// FIR low-pass that lowers the rate by M = 4 (32 kHz to 8 kHz).
//
// Only every M-th output of the filter is needed, so the filter is evaluated
// once per M input samples, with a single multiply-accumulate unit that walks
// over the TAPS taps in TAPS clocks. With the ADC's 1024 kHz clock there are
// 32 clocks between input samples, so the 29-tap sum ends before the next
// sample arrives; an assertion checks that no sample arrives while the sum
// is running. Samples are kept in a TAPS-word circular buffer.
//
// Interface: din is a signed IN_W-bit sample with IN_FRAC fractional bits,
// taken when in_valid is high. dout is a signed OUT_W-bit fraction (Q1.15 for
// 16 bits: 1.0 = full scale) rounded to nearest and saturated; overflow
// pulses with out_valid when the result had to be saturated. busy is high
// while the sum runs.
//
// Timing: the M-th sample after reset (and every M-th after it) starts a sum;
// out_valid pulses TAPS + 1 clocks after the clock edge that took that sample.
//
// The taps, their count and the decimation factor follow the design; the
// fixed-point formats, the serial multiply-accumulate structure, rounding and
// saturation are this design's choices. rst_n both resets the flip-flops
// asynchronously and disables the assertion, which lint reports as a mixed
// synchronous/asynchronous use of the reset; that is intended.
module fir_decimator
  import sd_adc_pkg::*;
#(
  parameter int unsigned TAPS    = FIR_TAPS,
  parameter int unsigned M       = FIR_M,
  parameter int unsigned IN_W    = CIC_W,
  parameter int unsigned IN_FRAC = CIC_N * $clog2(CIC_R),
  parameter int unsigned OUT_W   = ADC_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    out_valid,
  output logic                    overflow,
  output logic                    busy
);

  localparam int unsigned AW    = $clog2(TAPS);
  localparam int unsigned KW    = $clog2(TAPS + 1);
  localparam int unsigned PW    = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS);
  localparam int unsigned SHIFT = IN_FRAC + COEF_FRAC - (OUT_W - 1);

  typedef logic signed [ACC_W-1:0] acc_t;

  // Coefficient ROM, rounded from the real taps at elaboration.
  logic signed [COEF_W-1:0] coef_rom [TAPS];
  for (genvar k = 0; k < TAPS; k++) begin : g_coef
    localparam logic signed [COEF_W-1:0] C = fir_coef(k);
    assign coef_rom[k] = C;
  end

  logic signed [IN_W-1:0] smp [TAPS];   // circular sample buffer
  logic [AW-1:0] wr_ptr;                // next write position
  logic [AW-1:0] rd_ptr;                // sample multiplied with tap k
  logic [KW-1:0] k;                     // tap index of the running sum
  logic [PW-1:0] phase;                 // input count modulo M
  acc_t          acc;

  wire start = in_valid && (phase == PW'(M - 1));

  wire acc_t prod = acc_t'(smp[rd_ptr]) * acc_t'(coef_rom[k[AW-1:0]]);
  wire acc_t sum  = acc + prod;

  // Round to nearest and saturate to OUT_W bits.
  wire acc_t rounded = (sum + (acc_t'(1) <<< (SHIFT - 1))) >>> SHIFT;
  localparam acc_t MAX_OUT = acc_t'((1 << (OUT_W - 1)) - 1);
  localparam acc_t MIN_OUT = -acc_t'(1 << (OUT_W - 1));
  wire sat_hi = rounded > MAX_OUT;
  wire sat_lo = rounded < MIN_OUT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) smp[i] <= '0;
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      k         <= '0;
      phase     <= '0;
      acc       <= '0;
      busy      <= 1'b0;
      dout      <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      overflow  <= 1'b0;
      if (in_valid) begin
        smp[wr_ptr] <= din;
        wr_ptr      <= (wr_ptr == AW'(TAPS - 1)) ? '0 : wr_ptr + 1'b1;
        phase       <= start ? '0 : phase + 1'b1;
      end
      if (start) begin
        // Tap 0 multiplies the sample being written now.
        busy   <= 1'b1;
        k      <= '0;
        rd_ptr <= wr_ptr;
        acc    <= '0;
      end else if (busy) begin
        acc    <= sum;
        rd_ptr <= (rd_ptr == '0) ? AW'(TAPS - 1) : rd_ptr - 1'b1;
        if (k == KW'(TAPS - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          overflow  <= sat_hi || sat_lo;
          dout      <= sat_hi ? OUT_W'(MAX_OUT) : sat_lo ? OUT_W'(MIN_OUT) : OUT_W'(rounded);
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

  // A new sample during a running sum would overwrite the oldest sample
  // before its tap is reached.
  a_no_input_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(busy && in_valid))
    else $error("fir_decimator: input sample arrived while the sum was running");

endmodule
