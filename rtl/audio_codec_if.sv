// audio_codec_if: serial audio link between the FPGA and the codec.
//
// The FPGA is clock master. It drives the codec master clock (aud_xck, system
// clock / XCK_DIV), the bit clock (aud_bclk, system clock / (2*BCLK_HALF)) and
// one L/R clock (aud_lrck) used for both the ADC and the DAC side. A frame has
// 2*BITS_PER_CH bit clocks: the left channel while aud_lrck is high, then the
// right channel. Data are left-justified, 16 bits, most significant bit first:
// the MSB is valid at the first rising bit-clock edge of a channel. The FPGA
// changes aud_dacdat on falling bit-clock edges and samples aud_adcdat on
// rising ones.
//
// Capture: the 16 left-channel ADC bits of each frame (the microphone) are
// shifted in and presented on adc_sample with a one-cycle adc_valid strobe.
// Playback: dac_in is written into the DAC holding register at the falling
// edge of the L/R clock (dac_load strobe), so it is ready to be shifted out in
// the next channel slots; the same sample goes to both channels.
// frame_tick strobes at the rising edge of the L/R clock and starts the
// filter's processing of one sample.
//
// With the defaults (50 MHz clock, XCK_DIV 4, BCLK_HALF 8, BITS_PER_CH 32)
// the codec clock is 12.5 MHz, the bit clock 3.125 MHz and the sample rate
// 48.83 kHz (1024 clock cycles per sample). The DAC update at the falling L/R
// edge follows the design description; the clock master role, left-justified
// 16-bit format, channel use and the clock ratios are this design's choices,
// matching the interface register value 0x001 (left-justified, 16-bit, slave
// codec) in the codec table.
module audio_codec_if
  import anc_pkg::*;
#(
  parameter int unsigned XCK_DIV     = 4,
  parameter int unsigned BCLK_HALF   = 8,
  parameter int unsigned BITS_PER_CH = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t dac_in,
  output sample_t adc_sample,
  output logic    adc_valid,
  output logic    frame_tick,
  output logic    dac_load,
  output logic    aud_xck,
  output logic    aud_bclk,
  output logic    aud_lrck,
  input  logic    aud_adcdat,
  output logic    aud_dacdat
);

  localparam int unsigned HW  = (BCLK_HALF > 1) ? $clog2(BCLK_HALF) : 1;
  localparam int unsigned XW  = (XCK_DIV > 2) ? $clog2(XCK_DIV) : 1;
  localparam int unsigned BW  = $clog2(2 * BITS_PER_CH);

  logic [HW-1:0] hcnt;
  logic [XW-1:0] xcnt;
  logic [BW-1:0] bit_idx;     // bit slot within the frame
  logic [BW-1:0] bit_next;
  sample_t dac_hold, dac_sh;
  logic [SAMPLE_W-2:0] adc_sh;  // bits received so far in the left slot

  assign bit_next = (bit_idx == BW'(2 * BITS_PER_CH - 1)) ? '0 : bit_idx + 1'b1;

  // Codec master clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xcnt    <= '0;
      aud_xck <= 1'b0;
    end else if (xcnt == XW'(XCK_DIV / 2 - 1)) begin
      xcnt    <= '0;
      aud_xck <= ~aud_xck;
    end else begin
      xcnt <= xcnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt       <= '0;
      aud_bclk   <= 1'b0;
      bit_idx    <= BW'(2 * BITS_PER_CH - 1);  // first falling edge opens a frame
      aud_lrck   <= 1'b0;
      aud_dacdat <= 1'b0;
      dac_hold   <= '0;
      dac_sh     <= '0;
      adc_sh     <= '0;
      adc_sample <= '0;
      adc_valid  <= 1'b0;
      frame_tick <= 1'b0;
      dac_load   <= 1'b0;
    end else begin
      adc_valid  <= 1'b0;
      frame_tick <= 1'b0;
      dac_load   <= 1'b0;
      if (hcnt == HW'(BCLK_HALF - 1)) begin
        hcnt     <= '0;
        aud_bclk <= ~aud_bclk;
        if (aud_bclk) begin
          // ---- falling bit-clock edge: advance slot, drive DAC data ----
          bit_idx <= bit_next;
          if (bit_next == '0) begin                     // L/R clock rises: left
            aud_lrck   <= 1'b1;
            frame_tick <= 1'b1;
            aud_dacdat <= dac_hold[SAMPLE_W-1];
            dac_sh     <= {dac_hold[SAMPLE_W-2:0], 1'b0};
          end else if (bit_next == BW'(BITS_PER_CH)) begin // falls: right
            aud_lrck   <= 1'b0;
            dac_load   <= 1'b1;
            dac_hold   <= dac_in;
            aud_dacdat <= dac_in[SAMPLE_W-1];
            dac_sh     <= {dac_in[SAMPLE_W-2:0], 1'b0};
          end else begin
            aud_dacdat <= dac_sh[SAMPLE_W-1];
            dac_sh     <= {dac_sh[SAMPLE_W-2:0], 1'b0};
          end
        end else begin
          // ---- rising bit-clock edge: sample ADC data (left channel) ----
          if (bit_idx < BW'(SAMPLE_W)) begin
            adc_sh <= {adc_sh[SAMPLE_W-3:0], aud_adcdat};
            if (bit_idx == BW'(SAMPLE_W - 1)) begin
              adc_sample <= {adc_sh, aud_adcdat};
              adc_valid  <= 1'b1;
            end
          end
        end
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

endmodule
