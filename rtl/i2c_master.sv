// i2c_master: write-only I2C master for configuring the audio codec.
//
// One transaction sends 24 bits, most significant first: the device write
// address byte, then the codec's 16-bit word {register address[6:0],
// register contents[8:0]}. After each byte the master releases SDA for one
// clock to let the codec acknowledge, so a transaction carries three
// acknowledge slots before the stop condition. The acknowledgements are only
// recorded while the bits go out; they are evaluated after the whole 24 bits
// have been sent: ack is 1 when all three were received (SDA pulled low),
// and 0 otherwise.
//
// SCLK is the system clock divided by CLK_DIV (128 by default, about 390 kHz
// from 50 MHz, under the codec's 526 kHz limit). Each SCLK period is split into
// four quarters: SCLK is low in quarters 0 and 1 and high in 2 and 3; SDA
// changes at the start of quarter 1 and an acknowledgement is sampled at the
// end of quarter 2. Start: SDA falls with SCLK high for two quarters. Stop:
// SDA rises in the last quarter with SCLK high.
//
// Interface: pulse start with data valid while busy is 0; done pulses for one
// cycle at the end and ack holds the result until the next start. SDA is
// open-drain: sda_oe = 1 pulls the line low, otherwise it is released and
// sda_in reads it (a pad and pull-up outside this module close the loop).
// A transaction lasts (2 + 27*4 + 4) * CLK_DIV/4 clock cycles.
//
// The 24-bit format, the three acknowledgements, the divide-by-128 clock and
// the end-of-transfer acknowledgement check follow the design description;
// the quarter-phase timing and the input synchroniser are this design's.
module i2c_master #(
  parameter int unsigned CLK_DIV = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [23:0] data,
  output logic        busy,
  output logic        done,
  output logic        ack,
  output logic        sclk,
  output logic        sda_oe,
  input  logic        sda_in
);

  localparam int unsigned QUARTER = (CLK_DIV / 4 > 0) ? CLK_DIV / 4 : 1;
  localparam int unsigned QW = (QUARTER > 1) ? $clog2(QUARTER) : 1;
  localparam int unsigned NSLOTS = 27;  // 3 bytes x (8 data + 1 ack)

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} i2c_state_e;

  i2c_state_e  state;
  logic [QW-1:0] div_cnt;
  logic [1:0]  q;
  logic [4:0]  slot;
  logic [23:0] shreg;
  logic [2:0]  ack_bits;
  logic        sda_out;   // level put on SDA: 1 = released
  logic [1:0]  sda_sync;
  logic        tick;

  assign tick   = (div_cnt == QW'(QUARTER - 1));
  assign sda_oe = ~sda_out;
  assign busy   = (state != S_IDLE);

  function automatic logic is_ack_slot(logic [4:0] s);
    return (s == 5'd8) || (s == 5'd17) || (s == 5'd26);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sda_sync <= 2'b11;
    else        sda_sync <= {sda_sync[0], sda_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      div_cnt  <= '0;
      q        <= '0;
      slot     <= '0;
      shreg    <= '0;
      ack_bits <= '0;
      ack      <= 1'b0;
      done     <= 1'b0;
      sclk     <= 1'b1;
      sda_out  <= 1'b1;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        div_cnt <= '0;
        sclk    <= 1'b1;
        sda_out <= 1'b1;
        if (start) begin
          shreg    <= data;
          ack_bits <= '0;
          q        <= '0;
          slot     <= '0;
          sda_out  <= 1'b0;      // start condition: SDA falls, SCLK high
          state    <= S_START;
        end
      end else begin
        div_cnt <= tick ? '0 : div_cnt + 1'b1;
        if (tick) begin
          q <= q + 1'b1;
          unique case (state)
            S_START: begin
              if (q == 2'd1) begin
                q     <= '0;
                sclk  <= 1'b0;
                state <= S_BITS;
              end
            end
            S_BITS: begin
              unique case (q)
                2'd0: begin                   // SCLK low: put the next level on SDA
                  if (is_ack_slot(slot)) sda_out <= 1'b1;
                  else begin
                    sda_out <= shreg[23];
                    shreg   <= {shreg[22:0], 1'b0};
                  end
                end
                2'd1: sclk <= 1'b1;
                2'd2: if (is_ack_slot(slot)) ack_bits <= {ack_bits[1:0], ~sda_sync[1]};
                2'd3: begin
                  sclk <= 1'b0;
                  if (slot == 5'(NSLOTS - 1)) state <= S_STOP;
                  else                        slot  <= slot + 1'b1;
                end
                default: ;
              endcase
            end
            S_STOP: begin
              unique case (q)
                2'd0: sda_out <= 1'b0;
                2'd1: sclk    <= 1'b1;
                2'd2: sda_out <= 1'b1;        // stop condition: SDA rises, SCLK high
                2'd3: begin
                  ack   <= &ack_bits;         // all three acknowledgements seen
                  done  <= 1'b1;
                  state <= S_IDLE;
                end
                default: ;
              endcase
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end

endmodule
