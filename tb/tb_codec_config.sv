// tb_codec_config: self-checking test of the codec start-up configuration.
//
// A behavioural codec I2C port refuses to acknowledge the first two
// transactions. The test checks that the controller repeats the refused
// register, counts the repeats, then writes every register of the expected
// configuration (listed here independently of the RTL table) in table order,
// and raises config_done only after the last one, after the expected time.
module tb_codec_config;
  localparam int unsigned CLK_DIV = 128;
  localparam int unsigned T_XFER  = (2 + 27 * 4 + 4) * CLK_DIV / 4;

  logic clk = 0, rst_n = 0;
  logic config_done, sclk, sda_oe, sda_pull, sda_line;
  logic [7:0] nack_count;
  int checks = 0, failures = 0, cycles = 0;

  // expected register writes: address, 9-bit value
  localparam logic [6:0] EXP_ADDR [8] = '{7'h00, 7'h01, 7'h02, 7'h03, 7'h04, 7'h05, 7'h07, 7'h08};
  localparam logic [8:0] EXP_DATA [8] = '{9'b000010111, 9'b000010111, 9'b001111001, 9'b001111001,
                                          9'b011010100, 9'b000000100, 9'b000000001, 9'b000100000};

  assign sda_line = !(sda_oe || sda_pull);

  codec_config #(.CLK_DIV(CLK_DIV)) dut (
    .clk, .rst_n, .config_done, .nack_count,
    .i2c_sclk(sclk), .i2c_sda_oe(sda_oe), .i2c_sda_in(sda_line)
  );
  codec_i2c_model codec (.sclk(sclk), .sda(sda_line), .sda_pull(sda_pull));

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && !config_done) cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (12 * T_XFER) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // forget bus activity before reset took hold; refuse the first two writes
    codec.words.delete();
    codec.nacked = 0;
    codec.nack_count_left = 2;
    wait (config_done);
    repeat (200) @(posedge clk);
    check(nack_count == 2, $sformatf("nack_count %0d, expected 2", nack_count));
    check(codec.nacked == 2, "two transactions refused");
    check(codec.words.size() == 10, $sformatf("%0d transactions, expected 10", codec.words.size()));
    for (int i = 0; i < 10; i++) begin
      int r;
      r = (i < 2) ? 0 : i - 2;
      check(codec.words[i] == {8'h34, EXP_ADDR[r], EXP_DATA[r]},
            $sformatf("transaction %0d: %h", i, codec.words[i]));
    end
    for (int r = 0; r < 8; r++)
      check(codec.regs[EXP_ADDR[r]] == EXP_DATA[r],
            $sformatf("register R%0d = %b", EXP_ADDR[r], codec.regs[EXP_ADDR[r]]));
    check(cycles >= 10 * T_XFER && cycles <= 10 * (T_XFER + 4),
          $sformatf("configuration took %0d cycles", cycles));
    check(config_done, "config_done stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
