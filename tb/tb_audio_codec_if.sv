// tb_audio_codec_if: self-checking test of the serial audio interface.
//
// A behavioural codec in left-justified 16-bit slave mode sends random left
// ADC words (and a fixed right word) and records the DAC words it receives.
// The test checks the clock ratios (codec clock, bit clock, 1024-cycle frame,
// left channel while the L/R clock is high), that every left ADC word is
// delivered on adc_sample with adc_valid, that frame_tick and dac_load mark
// the rising and falling L/R edges, and that the value on dac_in at each
// falling L/R edge is played on the right and then the left DAC channel.
module tb_audio_codec_if;
  import anc_pkg::*;

  localparam int unsigned NFRAMES = 40;

  logic clk = 0, rst_n = 0;
  sample_t dac_in = '0, adc_sample;
  logic adc_valid, frame_tick, dac_load, aud_xck, aud_bclk, aud_lrck, aud_adcdat, aud_dacdat;
  int checks = 0, failures = 0, cyc = 0;
  int xck_rise = -1, xck_per = 0, bclk_rise = -1, bclk_per = 0, lr_rise = -1, lr_per = 0, lr_high = 0;
  int tick_on_rise = 0, load_on_fall = 0, ticks = 0, loads = 0;
  logic xck_d = 0, bclk_d = 0, lr_d = 0;
  sample_t dac_prev = '0;  // dac_in as seen at the previous clock edge
  sample_t got_adc [$];
  sample_t dac_loaded [$];

  audio_codec_if dut (.*);
  codec_audio_model codec (.bclk(aud_bclk), .lrck(aud_lrck), .dacdat(aud_dacdat), .adcdat(aud_adcdat));

  always #10 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (aud_xck && !xck_d) begin if (xck_rise >= 0) xck_per = cyc - xck_rise; xck_rise = cyc; end
    if (aud_bclk && !bclk_d) begin if (bclk_rise >= 0) bclk_per = cyc - bclk_rise; bclk_rise = cyc; end
    if (aud_lrck && !lr_d) begin if (lr_rise >= 0) lr_per = cyc - lr_rise; lr_rise = cyc; end
    if (!aud_lrck && lr_d && lr_rise >= 0) lr_high = cyc - lr_rise;
    if (frame_tick) begin ticks++; if (aud_lrck && !lr_d) tick_on_rise++; end
    if (dac_load) begin
      loads++;
      if (!aud_lrck && lr_d) load_on_fall++;
      dac_loaded.push_back(dac_prev);  // dac_load follows the capture by one cycle
    end
    if (adc_valid) got_adc.push_back(adc_sample);
    xck_d <= aud_xck; bclk_d <= aud_bclk; lr_d <= aud_lrck;
    dac_prev <= dac_in;
  end

  // change dac_in at random moments
  always @(negedge clk) if ($urandom_range(300) == 0) dac_in = sample_t'($urandom);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat ((NFRAMES + 5) * 1024) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NFRAMES + 2; i++) codec.adc_left.push_back(16'($urandom));
    repeat (3) @(posedge clk);
    rst_n = 1;
    // forget what the codec model saw before reset took hold
    codec.sent_left.delete();
    codec.dac_left.delete();
    codec.dac_right.delete();
    repeat (NFRAMES * 1024) @(posedge clk);
    check(xck_per == 4, $sformatf("codec clock period %0d", xck_per));
    check(bclk_per == 16, $sformatf("bit clock period %0d", bclk_per));
    check(lr_per == 1024, $sformatf("frame period %0d", lr_per));
    check(lr_high == 512, $sformatf("L/R clock high for %0d cycles", lr_high));
    check(ticks >= NFRAMES - 1 && tick_on_rise == ticks, "frame_tick on every rising L/R edge");
    check(loads >= NFRAMES - 1 && load_on_fall == loads, "dac_load on every falling L/R edge");
    check(got_adc.size() >= NFRAMES - 1, $sformatf("%0d ADC samples", got_adc.size()));
    foreach (got_adc[i])
      check(got_adc[i] == sample_t'(codec.sent_left[i]),
            $sformatf("ADC sample %0d: %h expected %h", i, got_adc[i], codec.sent_left[i]));
    // DAC: word loaded at fall n goes to right slot n and left slot n+1
    check(codec.dac_right.size() >= NFRAMES - 2, "DAC right words received");
    foreach (codec.dac_right[i])
      if (i < dac_loaded.size())
        check(codec.dac_right[i] == dac_loaded[i],
              $sformatf("DAC right %0d: %h expected %h", i, codec.dac_right[i], dac_loaded[i]));
    for (int i = 1; i < codec.dac_left.size() && i <= dac_loaded.size(); i++)
      check(codec.dac_left[i] == dac_loaded[i-1],
            $sformatf("DAC left %0d: %h expected %h", i, codec.dac_left[i], dac_loaded[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
