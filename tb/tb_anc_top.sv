// tb_anc_top: end-to-end test of the adaptive noise canceller at its default
// size (16 taps, 50 MHz clock, 48.83 kHz sample rate, SCLK = clock/128).
//
// Behavioural models stand in for the codec: its I2C control port (refusing
// the very first transaction once) and its serial audio port, which sends a
// microphone signal made of two tones and a little random noise and records
// the DAC words. The test checks
//   - the codec registers written over I2C and the repeated write after the
//     missing acknowledgement,
//   - every DAC word against a reference Fast-LMS model fed with the same
//     samples the filter takes (the first frame processes the reset value 0),
//   - the attenuation of the tonal noise once the filter has adapted,
//   - that no sample arrives while the filter is busy.
// It counts each mechanism (register write, repeated write, sample
// processed, DAC load on the falling L/R edge, history-buffer wrap-around,
// weight adaptation) and fails if one never happened.
module tb_anc_top;
  import anc_pkg::*;

  localparam int unsigned TAPS = 16;
  localparam int unsigned MU_SHIFT = 8;
  localparam int unsigned WFRAC = 15;
  localparam int unsigned NSAMPLES = 10000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic aud_xck, aud_bclk, aud_adclrck, aud_daclrck, aud_adcdat, aud_dacdat;
  logic i2c_sclk, i2c_sda_oe, i2c_sda_in, sda_pull;
  logic config_done, lms_overrun;
  logic [7:0] cfg_nacks;
  int checks = 0, failures = 0;
  int n_samples = 0, n_dac_loads = 0, n_wraps = 0, n_adapt = 0;
  logic [3:0] base_d = '0;

  localparam logic [6:0] EXP_ADDR [8] = '{7'h00, 7'h01, 7'h02, 7'h03, 7'h04, 7'h05, 7'h07, 7'h08};
  localparam logic [8:0] EXP_DATA [8] = '{9'b000010111, 9'b000010111, 9'b001111001, 9'b001111001,
                                          9'b011010100, 9'b000000100, 9'b000000001, 9'b000100000};

  assign i2c_sda_in = !(i2c_sda_oe || sda_pull);

  anc_top dut (.*);
  codec_i2c_model   codec_ctl (.sclk(i2c_sclk), .sda(i2c_sda_in), .sda_pull(sda_pull));
  codec_audio_model codec_aud (.bclk(aud_bclk), .lrck(aud_daclrck), .dacdat(aud_dacdat), .adcdat(aud_adcdat));

  always #10 clk = ~clk;   // 50 MHz

  // mechanism counters (observation only)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_lms.out_valid) n_samples++;
    if (dut.dac_load && !aud_daclrck) n_dac_loads++;
    if (dut.hist_base == 0 && base_d != 0) n_wraps++;
    if (dut.u_lms.state == ST_WEIGHTS && dut.u_lms.e_sat != 0) n_adapt++;
    base_d <= dut.hist_base;
  end

  function automatic longint sat(longint v, longint lo, longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat ((NSAMPLES + 60) * 1024) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w[TAPS], u[TAPS], x[$], e_ref[$];
    real err_late, sig_late;
    int nlate;
    err_late = 0.0; sig_late = 0.0; nlate = 0;
    for (int k = 0; k < NSAMPLES + 4; k++)
      codec_aud.adc_left.push_back(16'($rtoi(5000.0 * $sin(2.0 * PI * 0.011 * k) +
                                             2500.0 * $sin(2.0 * PI * 0.047 * k + 0.5)) +
                                       int'($urandom_range(100)) - 50));
    repeat (5) @(posedge clk);
    rst_n = 1;
    // forget bus activity before reset took hold; refuse the first write
    codec_ctl.words.delete();
    codec_ctl.bad_frames = 0;
    codec_ctl.nacked = 0;
    codec_ctl.nack_count_left = 1;
    codec_aud.sent_left.delete();
    codec_aud.dac_left.delete();
    codec_aud.dac_right.delete();
    wait (codec_aud.dac_right.size() >= NSAMPLES);
    repeat (10) @(posedge clk);

    // codec configuration
    check(config_done, "codec configuration finished");
    check(cfg_nacks == 1, $sformatf("repeated writes %0d, expected 1", cfg_nacks));
    check(codec_ctl.words.size() == 9, $sformatf("%0d I2C transactions, expected 9", codec_ctl.words.size()));
    for (int r = 0; r < 8; r++)
      check(codec_ctl.regs[EXP_ADDR[r]] == EXP_DATA[r], $sformatf("codec register R%0d", EXP_ADDR[r]));

    // reference Fast-LMS on the samples the filter took: 0, then the left ADC words
    x.push_back(0);
    foreach (codec_aud.sent_left[i]) x.push_back(longint'(signed'(codec_aud.sent_left[i])));
    foreach (w[i]) begin w[i] = 0; u[i] = 0; end
    for (int k = 0; k < NSAMPLES; k++) begin
      longint acc, e;
      acc = 0;
      for (int i = 0; i < TAPS; i++) acc += w[i] * u[i];
      e = sat(x[k] - (acc >>> WFRAC), -32768, 32767);
      for (int i = 0; i < TAPS; i++)
        w[i] = sat(w[i] + (((u[i] < 0) ? -e : e) >>> MU_SHIFT), -(longint'(1) << 23), (longint'(1) << 23) - 1);
      for (int i = TAPS - 1; i > 0; i--) u[i] = u[i-1];
      u[0] = x[k];
      e_ref.push_back(e);
    end
    for (int k = 0; k < NSAMPLES; k++) begin
      check(codec_aud.dac_right[k] == 16'(e_ref[k]),
            $sformatf("DAC right word %0d: %0d expected %0d", k, signed'(codec_aud.dac_right[k]), e_ref[k]));
      if (k + 1 < codec_aud.dac_left.size())
        check(codec_aud.dac_left[k+1] == 16'(e_ref[k]), $sformatf("DAC left word %0d", k + 1));
      if (k >= NSAMPLES - 1000) begin
        err_late += real'(e_ref[k] * e_ref[k]);
        sig_late += real'(x[k] * x[k]);
        nlate++;
      end
    end
    $display("last %0d samples: noise power %0.1f, output power %0.1f (%0.1f dB)", nlate,
             sig_late / nlate, err_late / nlate, 10.0 * $log10(err_late / sig_late));
    check(err_late < 0.1 * sig_late, "noise attenuated by more than 10 dB after adaptation");
    check(!lms_overrun, "no sample arrived while the filter was busy");

    $display("mechanisms: register writes %0d, repeated writes %0d, samples %0d, DAC loads %0d, buffer wraps %0d, weight updates %0d",
             codec_ctl.words.size(), cfg_nacks, n_samples, n_dac_loads, n_wraps, n_adapt);
    check(codec_ctl.words.size() > 0, "register writes happened");
    check(cfg_nacks > 0, "a repeated register write happened");
    check(n_samples >= NSAMPLES, "samples processed");
    check(n_dac_loads >= NSAMPLES, "DAC loads on the falling L/R edge happened");
    check(n_wraps > 0, "history buffer wrapped around");
    check(n_adapt > 0, "weights adapted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
