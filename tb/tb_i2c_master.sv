// tb_i2c_master: self-checking test of the 24-bit I2C write master.
//
// A behavioural codec I2C port receives the transactions. The test sends
// random 24-bit words, some acknowledged and some not, and checks that the
// model received exactly the word sent, that ack reports whether all three
// acknowledgements came, the SCLK period (CLK_DIV system clocks), that SDA
// only changes while SCLK is low except for start and stop, and the
// transaction length of (2 + 27*4 + 4) * CLK_DIV/4 cycles.
module tb_i2c_master;
  localparam int unsigned CLK_DIV = 128;

  logic clk = 0, rst_n = 0, start = 0;
  logic [23:0] data = '0;
  logic busy, done, ack, sclk, sda_oe, sda_pull, sda_line;
  int checks = 0, failures = 0;
  int last_rise = -1, period = 0, bad_sda = 0, cyc = 0;
  logic sclk_d = 1, sda_d = 1;

  assign sda_line = !(sda_oe || sda_pull);

  i2c_master #(.CLK_DIV(CLK_DIV)) dut (
    .clk, .rst_n, .start, .data, .busy, .done, .ack, .sclk, .sda_oe,
    .sda_in(sda_line)
  );
  codec_i2c_model codec (.sclk(sclk), .sda(sda_line), .sda_pull(sda_pull));

  always #10 clk = ~clk;

  // SCLK period and SDA-while-SCLK-high monitor
  always @(posedge clk) begin
    cyc++;
    if (sclk && !sclk_d) begin
      if (last_rise >= 0) period = cyc - last_rise;
      last_rise = cyc;
    end
    if (busy && sclk && sclk_d && (sda_line != sda_d) && codec.active &&
        codec.bitn != 27 && codec.bitn != 0) bad_sda++;
    sclk_d <= sclk;
    sda_d  <= sda_line;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40 * 4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    codec.bad_frames = 0;   // ignore bus activity before reset took hold
    check(sclk && sda_line, "bus idle after reset");
    for (int t = 0; t < 12; t++) begin
      int n;
      bit want_ack;
      want_ack = (t % 4 != 2);
      if (!want_ack) codec.nack_count_left = 1;
      @(negedge clk);
      data  = {8'h34, 16'($urandom)};
      start = 1;
      @(negedge clk);
      start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      check(n == (2 + 27 * 4 + 4) * CLK_DIV / 4 + 1,
            $sformatf("transaction %0d took %0d cycles", t, n));
      check(ack == want_ack, $sformatf("transaction %0d: ack=%0d expected %0d", t, ack, want_ack));
      check(codec.words.size() == t + 1 && codec.words[t] == data,
            $sformatf("transaction %0d: codec received %h, sent %h", t,
                      codec.words.size() > t ? codec.words[t] : 24'h0, data));
      check(period == CLK_DIV, $sformatf("SCLK period %0d", period));
      repeat (20) @(negedge clk);
      check(!busy && sclk && sda_line, "bus released after stop");
    end
    check(bad_sda == 0, $sformatf("%0d SDA changes while SCLK high", bad_sda));
    check(codec.bad_frames == 0, "every frame had 24 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
