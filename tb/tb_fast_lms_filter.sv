// tb_fast_lms_filter: self-checking test of the Fast-LMS noise canceller.
//
// Feeds a noise signal (two sine tones plus a little random noise) one sample
// per tick and compares, for every sample, the filter output y(k) and the
// error e(k) with a reference model that keeps its own tap delay line and
// weight vector and applies
//   y = (sum w_i u_i) >>> 15,  e = sat16(d - y),  w_i += (sign(u_i) e) >>> MU_SHIFT.
// It also checks the controller timing (error two cycles after the tick, busy
// for TAPS + 5 cycles), that a tick arriving while busy is dropped and flagged,
// and that the predictable noise is attenuated after adaptation.
module tb_fast_lms_filter;
  import anc_pkg::*;

  localparam int unsigned TAPS = 16;
  localparam int unsigned MU_SHIFT = 8;
  localparam int unsigned WFRAC = 15;
  localparam int unsigned NSAMPLES = 6000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, sample_tick = 0;
  sample_t noise_in = '0, error_out, filter_out;
  logic out_valid, busy, overrun;
  logic [$clog2(TAPS)-1:0] hist_base;
  int checks = 0, failures = 0, overruns = 0;

  fast_lms_filter #(.TAPS(TAPS), .MU_SHIFT(MU_SHIFT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && overrun) overruns++;

  // reference model state
  longint ref_w[TAPS];
  longint ref_u[TAPS];

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
    repeat (NSAMPLES * 40 + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real   err_early, err_late, sig_late;
    err_early = 0.0; err_late = 0.0; sig_late = 0.0;
    foreach (ref_w[i]) begin ref_w[i] = 0; ref_u[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < NSAMPLES; k++) begin
      longint d, acc, ys, e, ye;
      int lat, busy_cycles;
      d = longint'($rtoi(6000.0 * $sin(2.0 * PI * 0.013 * k) +
                         3000.0 * $sin(2.0 * PI * 0.071 * k + 1.0))) +
          longint'($urandom_range(200)) - 100;
      // reference: predict d from the past samples, then adapt
      acc = 0;
      for (int i = 0; i < TAPS; i++) acc += ref_w[i] * ref_u[i];
      ys = acc >>> WFRAC;
      ye = sat(ys, -32768, 32767);
      e  = sat(d - ys, -32768, 32767);
      for (int i = 0; i < TAPS; i++)
        ref_w[i] = sat(ref_w[i] + (((ref_u[i] < 0) ? -e : e) >>> MU_SHIFT),
                       -(longint'(1) << 23), (longint'(1) << 23) - 1);
      for (int i = TAPS - 1; i > 0; i--) ref_u[i] = ref_u[i-1];
      ref_u[0] = d;

      // drive the DUT
      @(negedge clk);
      noise_in = sample_t'(d);
      sample_tick = 1;
      @(negedge clk);
      sample_tick = 0;
      // lat counts clock edges after the one that samples the tick
      lat = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      check(lat == 2, $sformatf("sample %0d: error after %0d cycles, expected 2", k, lat));
      check(error_out == sample_t'(e), $sformatf("sample %0d: e=%0d expected %0d", k, error_out, e));
      check(filter_out == sample_t'(ye), $sformatf("sample %0d: y=%0d expected %0d", k, filter_out, ye));
      // one extra tick while busy: must be dropped and flagged
      if (k == 100) begin
        sample_tick = 1;
        @(negedge clk);
        sample_tick = 0;
        check(overrun == 1'b1, "tick while busy flags overrun");
      end
      busy_cycles = lat + ((k == 100) ? 1 : 0);  // cycles spent outside IDLE so far
      while (busy) begin @(negedge clk); busy_cycles++; end
      check(busy_cycles == TAPS + 5, $sformatf("sample %0d: busy %0d cycles, expected %0d", k, busy_cycles, TAPS + 5));
      if (k < 200) err_early += real'(e * e);
      if (k >= NSAMPLES - 1000) begin
        err_late += real'(e * e);
        sig_late += real'(d * d);
      end
      repeat (3) @(negedge clk);
    end
    $display("error power: first 200 samples %0.1f, last 1000 samples %0.1f (signal %0.1f)",
             err_early / 200.0, err_late / 1000.0, sig_late / 1000.0);
    check(overruns == 1, $sformatf("one overrun expected, saw %0d", overruns));
    check(err_late < 0.05 * sig_late, "adapted filter attenuates the noise by more than 13 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
