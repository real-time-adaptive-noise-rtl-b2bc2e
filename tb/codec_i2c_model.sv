// codec_i2c_model: behavioural model of the codec's I2C control port.
//
// Not synthesizable; for testbenches only. It watches SCLK and the SDA line,
// detects start and stop conditions, shifts in the bits of each byte on the
// rising SCLK edge and pulls SDA low during every acknowledge slot, unless
// nack_count_left is above zero, in which case the whole transaction is left
// unacknowledged and nack_count_left is decremented. A transaction of exactly
// 24 bits that ends with a stop is stored in words[] and, if its first byte is
// the codec's write address 0x34, written into regs[reg_addr] (9-bit value).
module codec_i2c_model (
  input  logic sclk,
  input  logic sda,       // resolved SDA line
  output logic sda_pull   // 1 = model pulls SDA low
);
  logic [8:0]  regs [128];
  logic [23:0] words [$];
  int          nack_count_left = 0;
  int          nacked = 0;      // transactions left unacknowledged
  int          bad_frames = 0;  // stops after a number of bits other than 24
  int          bitn = 0;        // bit slots completed (data and acknowledge)
  bit          active = 0, got_high = 0, ack_this = 1;
  logic [23:0] word = '0;

  initial begin
    sda_pull = 0;
    foreach (regs[i]) regs[i] = '0;
  end

  always @(negedge sda) if (sclk) begin         // start condition
    active   = 1;
    bitn     = 0;
    got_high = 0;
    word     = '0;
    ack_this = (nack_count_left == 0);
    if (!ack_this) begin
      nack_count_left--;
      nacked++;
    end
  end

  always @(posedge sda) if (sclk && active) begin   // stop condition
    active = 0;
    if (bitn == 27) begin
      words.push_back(word);
      if (word[23:16] == 8'h34 && ack_this) regs[word[15:9]] = word[8:0];
    end else bad_frames++;
  end

  always @(posedge sclk) if (active) begin
    got_high = 1;
    if (bitn < 27 && bitn % 9 != 8) word = {word[22:0], sda};
  end

  always @(negedge sclk) if (active && got_high) begin
    got_high = 0;
    bitn++;
    sda_pull = ack_this && (bitn % 9 == 8) && (bitn < 27);
  end
endmodule
