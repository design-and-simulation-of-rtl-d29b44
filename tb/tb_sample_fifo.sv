// tb_sample_fifo: random writes and reads against a queue kept by the
// testbench; checks the data order, empty/full/level, that a write into a
// full buffer is dropped and sets the sticky overflow flag, and the flush.
module tb_sample_fifo;
  import dts_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  sample_t wr_data, rd_data;
  logic empty, full, overflow;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  sample_t q [$];

  sample_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #31 clk = !clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = '0;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && level == 0 && !overflow, "empty after reset");
    for (int k = 0; k < 3000; k++) begin
      // bias towards writing in the first half, reading in the second
      wr_en   = ($urandom % 100) < ((k < 1500) ? 60 : 40);
      rd_en   = ($urandom % 100) < ((k < 1500) ? 40 : 60);
      if (q.size() == DEPTH) wr_en = 1'b0;
      wr_data = sample_t'($urandom);
      check(level == q.size(), "level");
      check(empty == (q.size() == 0) && full == (q.size() == DEPTH), "flags");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("data %h expected %h", rd_data, q[0]));
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 1'b0; rd_en = 1'b0;
    check(!overflow, "no overflow while never written full");
    // fill, then one more write
    while (q.size() < DEPTH) begin
      wr_en = 1'b1; wr_data = sample_t'($urandom); @(posedge clk); q.push_back(wr_data); @(negedge clk);
    end
    check(full, "full");
    wr_data = 15'h7FFF; @(posedge clk); @(negedge clk); wr_en = 1'b0;
    check(overflow && level == DEPTH, "write into full buffer dropped, overflow set");
    for (int i = 0; i < DEPTH; i++) begin
      check(rd_data == q[i], "contents after overflow");
      rd_en = 1'b1; @(posedge clk); @(negedge clk);
    end
    rd_en = 1'b0;
    check(empty && overflow, "drained, overflow sticky");
    wr_en = 1'b1; @(posedge clk); @(negedge clk); wr_en = 1'b0;
    clr = 1'b1; @(posedge clk); @(negedge clk); clr = 1'b0;
    check(empty, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
