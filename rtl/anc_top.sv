// anc_top: real-time feed-forward adaptive noise canceller.
//
// The microphone signal reaches the FPGA through the audio codec's ADC. For
// every sample the Fast-LMS filter predicts the noise from the preceding
// samples and subtracts that prediction; the difference (the error signal,
// the reduced noise) is sent back to the codec's DAC and a speaker. At
// start-up the codec registers are written once over I2C.
//
//   aud_adcdat -> audio_codec_if -> adc_sample -> fast_lms_filter (u(k), d(k))
//   fast_lms_filter.error_out -> audio_codec_if (DAC, loaded at L/R fall)
//   codec_config -> i2c_master -> i2c_sclk / i2c_sda_oe / i2c_sda_in
//
// The filter starts processing on each rising edge of the L/R clock and
// finishes in TAPS + 5 clock cycles, far inside the 1024-cycle sample period
// of the defaults (50 MHz system clock, 48.83 kHz sample rate).
//
// Ports: clk is the 50 MHz system clock, rst_n an active-low asynchronous
// reset. The aud_* pins go to the codec's serial audio port (one L/R clock for
// both ADC and DAC). I2C data is split into an open-drain enable and an input
// so a board wrapper can place the bidirectional pad. config_done shows that
// all codec registers were acknowledged, cfg_nacks counts repeated register
// writes, and lms_overrun is a sticky flag set if a sample arrived while the
// filter was still busy.
//
// The structure follows the design description; the status outputs and the
// split I2C data pin are this design's choices.
module anc_top
  import anc_pkg::*;
#(
  parameter int unsigned TAPS        = 16,
  parameter int unsigned WEIGHT_W    = 24,
  parameter int unsigned WFRAC       = 15,
  parameter int unsigned MU_SHIFT    = 8,
  parameter int unsigned I2C_CLK_DIV = 128,
  parameter int unsigned XCK_DIV     = 4,
  parameter int unsigned BCLK_HALF   = 8,
  parameter int unsigned BITS_PER_CH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // codec serial audio port
  output logic       aud_xck,
  output logic       aud_bclk,
  output logic       aud_adclrck,
  output logic       aud_daclrck,
  input  logic       aud_adcdat,
  output logic       aud_dacdat,
  // codec control port
  output logic       i2c_sclk,
  output logic       i2c_sda_oe,
  input  logic       i2c_sda_in,
  // status
  output logic       config_done,
  output logic [7:0] cfg_nacks,
  output logic       lms_overrun
);

  localparam int unsigned AW = (TAPS > 1) ? $clog2(TAPS) : 1;

  sample_t adc_sample, error_out, filter_out;
  logic    adc_valid, frame_tick, dac_load, lrck;
  logic    out_valid, busy, overrun;
  logic [AW-1:0] hist_base;

  codec_config #(.CLK_DIV(I2C_CLK_DIV)) u_cfg (
    .clk         (clk),
    .rst_n       (rst_n),
    .config_done (config_done),
    .nack_count  (cfg_nacks),
    .i2c_sclk    (i2c_sclk),
    .i2c_sda_oe  (i2c_sda_oe),
    .i2c_sda_in  (i2c_sda_in)
  );

  audio_codec_if #(
    .XCK_DIV     (XCK_DIV),
    .BCLK_HALF   (BCLK_HALF),
    .BITS_PER_CH (BITS_PER_CH)
  ) u_aud (
    .clk        (clk),
    .rst_n      (rst_n),
    .dac_in     (error_out),
    .adc_sample (adc_sample),
    .adc_valid  (adc_valid),
    .frame_tick (frame_tick),
    .dac_load   (dac_load),
    .aud_xck    (aud_xck),
    .aud_bclk   (aud_bclk),
    .aud_lrck   (lrck),
    .aud_adcdat (aud_adcdat),
    .aud_dacdat (aud_dacdat)
  );

  assign aud_adclrck = lrck;
  assign aud_daclrck = lrck;

  fast_lms_filter #(
    .TAPS     (TAPS),
    .WEIGHT_W (WEIGHT_W),
    .WFRAC    (WFRAC),
    .MU_SHIFT (MU_SHIFT)
  ) u_lms (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_tick (frame_tick),
    .noise_in    (adc_sample),
    .error_out   (error_out),
    .filter_out  (filter_out),
    .out_valid   (out_valid),
    .busy        (busy),
    .overrun     (overrun),
    .hist_base   (hist_base)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lms_overrun <= 1'b0;
    else if (overrun) lms_overrun <= 1'b1;
  end

  // The DAC must never be loaded while the filter is updating its output.
  a_dac_load_apart: assert property (@(posedge clk) disable iff (!rst_n) dac_load |-> !out_valid)
    else $error("anc_top: DAC loaded in the cycle the filter output changes");

endmodule
