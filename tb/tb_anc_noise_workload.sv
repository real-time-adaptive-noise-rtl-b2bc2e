// tb_anc_noise_workload: the canceller at default size on broadband noise.
//
// The intended use plays white noise from a loudspeaker into the microphone.
// This test feeds the codec model two phases of noise, 8000 samples each:
//   1. white noise (uniform, +/-8000), which a one-step predictor cannot
//      reduce: the output power must stay within 1 dB of the input, i.e. the
//      filter must not amplify or diverge;
//   2. the same white noise coloured by a two-pole resonance (a stand-in for
//      loudspeaker, room and microphone responses, chosen for this test),
//      which the filter must attenuate by more than 3 dB.
// Every DAC word is compared with a reference Fast-LMS model fed the same
// samples, and the power ratios of the last 2000 samples of each phase are
// reported.
module tb_anc_noise_workload;
  import anc_pkg::*;

  localparam int unsigned TAPS = 16;
  localparam int unsigned MU_SHIFT = 8;
  localparam int unsigned WFRAC = 15;
  localparam int unsigned NPHASE = 8000;
  localparam int unsigned NSAMPLES = 2 * NPHASE;

  logic clk = 0, rst_n = 0;
  logic aud_xck, aud_bclk, aud_adclrck, aud_daclrck, aud_adcdat, aud_dacdat;
  logic i2c_sclk, i2c_sda_oe, i2c_sda_in, sda_pull;
  logic config_done, lms_overrun;
  logic [7:0] cfg_nacks;
  int checks = 0, failures = 0;

  assign i2c_sda_in = !(i2c_sda_oe || sda_pull);

  anc_top dut (.*);
  codec_i2c_model   codec_ctl (.sclk(i2c_sclk), .sda(i2c_sda_in), .sda_pull(sda_pull));
  codec_audio_model codec_aud (.bclk(aud_bclk), .lrck(aud_daclrck), .dacdat(aud_dacdat), .adcdat(aud_adcdat));

  always #10 clk = ~clk;   // 50 MHz

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
    real in_p[2], out_p[2], c1, c2;
    foreach (in_p[i]) begin in_p[i] = 0.0; out_p[i] = 0.0; end
    c1 = 0.0; c2 = 0.0;
    // phase 1: white; phase 2: white through y[k] = n[k] + 1.5 y[k-1] - 0.8 y[k-2], scaled
    for (int k = 0; k < NSAMPLES + 4; k++) begin
      real n, c;
      n = real'(int'($urandom_range(16000)) - 8000);
      if (k < NPHASE) codec_aud.adc_left.push_back(16'($rtoi(n)));
      else begin
        c  = n + 1.5 * c1 - 0.8 * c2;
        c2 = c1;
        c1 = c;
        codec_aud.adc_left.push_back(16'($rtoi(0.4 * c)));
      end
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    codec_aud.sent_left.delete();
    codec_aud.dac_left.delete();
    codec_aud.dac_right.delete();
    wait (codec_aud.dac_right.size() >= NSAMPLES);
    repeat (10) @(posedge clk);

    // reference on the samples the filter took: 0, then the left ADC words
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
      int ph;
      check(codec_aud.dac_right[k] == 16'(e_ref[k]), $sformatf("DAC word %0d", k));
      ph = k / NPHASE;
      if (k % NPHASE >= NPHASE - 2000) begin
        in_p[ph]  += real'(x[k] * x[k]);
        out_p[ph] += real'(e_ref[k] * e_ref[k]);
      end
    end
    $display("white noise:    output/input power %0.2f dB", 10.0 * $log10(out_p[0] / in_p[0]));
    $display("coloured noise: output/input power %0.2f dB", 10.0 * $log10(out_p[1] / in_p[1]));
    check(10.0 * $log10(out_p[0] / in_p[0]) < 1.0, "white noise not amplified");
    check(10.0 * $log10(out_p[1] / in_p[1]) < -3.0, "coloured noise attenuated by more than 3 dB");
    check(config_done && !lms_overrun, "codec configured, no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
