// tb_history_buffer: self-checking test of the circular history buffer.
//
// Writes a stream of random samples with the write / increment sequence the
// filter uses, and after every sample reads back all ages and compares them
// with a reference history kept in a queue (never-written entries read as 0).
// Also checks the base pointer wrap and the one-cycle read latency.
module tb_history_buffer;
  import anc_pkg::*;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, inc = 0, rd_en = 0;
  sample_t wr_data = '0, rd_data;
  logic [AW-1:0] rd_age = '0, base;
  int checks = 0, failures = 0, wraps = 0;
  sample_t hist[$];   // hist[0] = newest

  history_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(base == 0, "base after reset");
    for (int s = 0; s < 3 * DEPTH + 3; s++) begin
      logic [AW-1:0] old_base;
      sample_t v;
      old_base = base;
      v = sample_t'($urandom);
      // store
      @(negedge clk); wr_en = 1; wr_data = v;
      @(negedge clk); wr_en = 0; inc = 1;
      @(negedge clk); inc = 0;
      hist.push_front(v);
      if (hist.size() > DEPTH) void'(hist.pop_back());
      check(base == AW'((old_base + 1) % DEPTH), "base increments by one");
      if (base == 0) wraps++;
      // read back every age; data appears one cycle after the request
      for (int a = 0; a < DEPTH; a++) begin
        sample_t exp_v;
        exp_v = (a < hist.size()) ? hist[a] : sample_t'(0);
        rd_en = 1; rd_age = AW'(a);
        @(negedge clk); rd_en = 0;
        check(rd_data == exp_v, $sformatf("sample %0d age %0d: got %0d exp %0d", s, a, rd_data, exp_v));
      end
    end
    check(wraps >= 3, "base pointer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
