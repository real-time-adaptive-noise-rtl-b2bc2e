// codec_config: start-up configuration of the audio codec over I2C.
//
// After reset the controller walks through the codec register table of
// anc_pkg (left/right ADC input volume, left/right DAC volume, analog and
// digital audio path, digital audio interface format, sampling rate) and
// writes each entry with one 24-bit I2C transaction: write address 0x34, then
// {register address, 9-bit value}. When a transaction ends without all three
// acknowledgements the same register is sent again; nack_count counts these
// repeats. config_done rises after the last register was acknowledged and
// stays high until reset.
//
// The register values and the 24-bit word layout follow the design
// description. Starting automatically after reset, the order of the writes
// (table order) and the retry on a missing acknowledgement are this design's
// choices.
//
// Timing: NREGS transactions of (2 + 27*4 + 4) * CLK_DIV/4 cycles each, plus
// two cycles per register for handing over to the I2C master.
module codec_config
  import anc_pkg::*;
#(
  parameter int unsigned CLK_DIV = 128,
  parameter int unsigned NREGS   = CODEC_NREGS
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       config_done,
  output logic [7:0] nack_count,
  output logic       i2c_sclk,
  output logic       i2c_sda_oe,
  input  logic       i2c_sda_in
);

  typedef enum logic [1:0] {C_SEND, C_WAIT, C_DONE} cfg_state_e;

  cfg_state_e  state;
  logic [3:0]  idx;
  logic        i2c_start, i2c_busy, i2c_done, i2c_ack;
  logic [23:0] i2c_data;
  codec_reg_t  entry;

  always_comb begin
    entry    = codec_reg(int'(idx));
    i2c_data = {CODEC_I2C_WRITE_ADDR, entry.addr, entry.data};
    i2c_start = (state == C_SEND) && !i2c_busy;
  end

  i2c_master #(.CLK_DIV(CLK_DIV)) u_i2c (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (i2c_start),
    .data   (i2c_data),
    .busy   (i2c_busy),
    .done   (i2c_done),
    .ack    (i2c_ack),
    .sclk   (i2c_sclk),
    .sda_oe (i2c_sda_oe),
    .sda_in (i2c_sda_in)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_SEND;
      idx         <= '0;
      config_done <= 1'b0;
      nack_count  <= '0;
    end else begin
      unique case (state)
        C_SEND: if (!i2c_busy) state <= C_WAIT;
        C_WAIT: if (i2c_done) begin
          if (!i2c_ack) begin
            if (nack_count != 8'hFF) nack_count <= nack_count + 1'b1;
            state <= C_SEND;                       // repeat this register
          end else if (idx == 4'(NREGS - 1)) begin
            config_done <= 1'b1;
            state       <= C_DONE;
          end else begin
            idx   <= idx + 1'b1;
            state <= C_SEND;
          end
        end
        C_DONE: ;
        default: state <= C_DONE;
      endcase
    end
  end

endmodule
