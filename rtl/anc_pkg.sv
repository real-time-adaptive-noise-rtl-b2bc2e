// anc_pkg: types and constants shared by the adaptive noise canceller.
//
// Audio samples are 16-bit two's complement words, the word length the
// codec is configured for (digital audio interface register R7, WL = 16 bit).
// The controller of the Fast-LMS filter has six states; their order follows
// the processing sequence of one sample. The codec register table holds the
// nine-bit register values written over I2C at start-up, exactly as listed in
// the configuration table of the design (R0-R5, R7, R8). The codec's 7-bit
// I2C device address (0x1A, write byte 0x34) is taken from the codec data
// sheet and is not part of the table.
package anc_pkg;

  localparam int unsigned SAMPLE_W = 16;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Six controller states of the Fast-LMS filter, in processing order.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // wait for the rising edge of the DAC L/R clock
    ST_SAMPLE  = 3'd1,  // take the new noise sample
    ST_WEIGHTS = 3'd2,  // update all filter weights
    ST_STORE   = 3'd3,  // write the sample into the circular buffer
    ST_INC     = 3'd4,  // increment the buffer base pointer
    ST_RESTORE = 3'd5   // reload the tap registers from the buffer
  } lms_state_e;

  // One codec register write: 7-bit register address, 9-bit contents.
  typedef struct packed {
    logic [6:0] addr;
    logic [8:0] data;
  } codec_reg_t;

  localparam int unsigned CODEC_NREGS = 8;
  localparam logic [7:0]  CODEC_I2C_WRITE_ADDR = 8'h34;

  function automatic codec_reg_t codec_reg(input int unsigned idx);
    case (idx)
      0: return '{addr: 7'h00, data: 9'b000010111}; // left ADC input volume
      1: return '{addr: 7'h01, data: 9'b000010111}; // right ADC input volume
      2: return '{addr: 7'h02, data: 9'b001111001}; // left DAC volume
      3: return '{addr: 7'h03, data: 9'b001111001}; // right DAC volume
      4: return '{addr: 7'h04, data: 9'b011010100}; // analog audio path
      5: return '{addr: 7'h05, data: 9'b000000100}; // digital audio path
      6: return '{addr: 7'h07, data: 9'b000000001}; // digital audio interface
      7: return '{addr: 7'h08, data: 9'b000100000}; // sampling rate
      default: return '{addr: 7'h00, data: 9'b000000000};
    endcase
  endfunction

endpackage
