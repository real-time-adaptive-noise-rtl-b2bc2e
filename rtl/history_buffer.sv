// history_buffer: circular buffer of past noise samples for the Fast-LMS filter.
//
// The buffer keeps the most recent DEPTH input samples in a memory array and a
// base pointer. Once per audio sample the controller writes the new sample at
// the base address (wr_en) and then advances the base pointer by one (inc),
// so the pointer always marks the oldest entry and the newest sample sits just
// below it. Each tap register of the filter is then reloaded by reading back
// "age" positions: rd_age = 0 returns the sample written last, rd_age = 1 the
// one before it, and so on (address base - 1 - rd_age, modulo DEPTH).
//
// The write / increment / read-back sequence is the one of the filter's state
// machine; the depth, the read-back addressing by age and the zero returned
// for entries never written since reset (so the history starts out silent
// without clearing the memory) are this design's choices.
//
// Timing: writes and pointer updates take effect at the clock edge; a read
// requested with rd_en in one cycle returns rd_data in the next (synchronous
// read, as a block RAM does). wr_en and inc must not be asserted together.
module history_buffer
  import anc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  sample_t       wr_data,
  input  logic          inc,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_age,
  output sample_t       rd_data,
  output logic [AW-1:0] base
);

  sample_t mem [DEPTH];
  logic [AW:0] fill;  // number of valid entries, saturates at DEPTH
  logic [AW-1:0] rd_addr;

  always_comb rd_addr = AW'((int'(base) + int'(DEPTH) - 1 - int'(rd_age)) % int'(DEPTH));

  always_ff @(posedge clk) begin
    if (wr_en) mem[base] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base    <= '0;
      fill    <= '0;
      rd_data <= '0;
    end else begin
      if (wr_en && fill < (AW+1)'(DEPTH)) fill <= fill + 1'b1;
      if (inc) base <= AW'((int'(base) + 1) % int'(DEPTH));
      if (rd_en) rd_data <= ((AW+1)'(rd_age) < fill) ? mem[rd_addr] : '0;
    end
  end

  a_no_write_and_inc: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && inc))
    else $error("history_buffer: write and pointer increment in the same cycle");

endmodule
