// tb_nand_ctrl: runs the command engine against the behavioural flash.
// A bus monitor records every byte latched on the rising edge of WE# with
// its CLE/ALE flags and compares the sequence of each operation with the
// flash protocol: erase 60h, two row bytes, D0h; program 80h, col low,
// col high, row low, row high, data, 10h; read 00h, four address bytes,
// 30h. It programs block 0 page 1 and a page in block 5 with random data
// (with gaps in the write stream), reads them back with a stalling reader,
// reads the bad-block byte of a marked block and of a good one, and checks
// the timing: two clocks per WE# cycle, CE# low throughout.
module tb_nand_ctrl;
  import dts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0;
  nand_op_e op;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic [12:0] nbytes;
  logic busy, done;
  logic [7:0] wr_data, rd_data, io_out, io_in;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic io_oe, cle, ale, ce_n, re_n, we_n, rb;
  int n_read, n_prog, n_erase, n_err;
  int checks = 0, failures = 0;

  nand_ctrl dut (
    .clk, .rst_n, .req, .op, .row, .col, .nbytes, .busy, .done,
    .wr_data, .wr_valid, .wr_ready, .rd_data, .rd_valid, .rd_ready,
    .io_out, .io_oe, .io_in, .cle, .ale, .ce_n, .re_n, .we_n, .rb
  );

  nand_flash_model #(.T_R(40), .T_PROG(200), .T_BERS(300), .BAD0(7)) flash (
    .clk, .io_in(io_out), .io_oe, .io_out(io_in), .cle, .ale, .ce_n,
    .re_n, .we_n, .rb, .n_read, .n_prog, .n_erase, .n_err
  );

  always #31 clk = !clk;

  // bus monitor: {cle, ale, byte}
  logic [9:0] bus [$];
  always @(posedge we_n) begin
    if (rst_n && ce_n) begin failures++; $display("FAIL WE# cycle with CE# high"); end
    bus.push_back({cle, ale, io_out});
  end
  always @(posedge re_n) if (rst_n && ce_n) begin failures++; $display("FAIL RE# cycle with CE# high"); end

  // WE# low time and CE# during operations
  int we_low = 0;
  always @(posedge clk) begin
    if (!we_n) we_low++;
    if (we_n && we_low != 0) begin
      if (we_low != 1) begin failures++; $display("FAIL WE# low %0d clocks", we_low); end
      we_low = 0;
    end
  end

  logic [7:0] rd_q [$];
  always @(posedge clk) if (rd_valid) rd_q.push_back(rd_data);

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input nand_op_e o, input int r, input int c, input int n);
    @(negedge clk);
    op = o; row = ROW_W'(r); col = COL_W'(c); nbytes = 13'(n); req = 1'b1;
    @(negedge clk); req = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic expect_header(input logic [9:0] exp [], input string what);
    for (int i = 0; i < exp.size(); i++) begin
      check(bus.size() > 0 && bus[0] == exp[i],
            $sformatf("%s byte %0d: got %h expected %h", what, i,
                      bus.size() > 0 ? bus[0] : 10'h3FF, exp[i]));
      if (bus.size() > 0) void'(bus.pop_front());
    end
  endtask

  logic [7:0] pat [2048];
  int widx;

  // write stream with random gaps
  always @(posedge clk) begin
    if (wr_ready) begin
      widx++;
      wr_data <= pat[widx % 2048];
    end
    wr_valid <= ($urandom % 4) != 0;
    rd_ready <= ($urandom % 3) != 0;
  end

  initial begin
    int t0, t1;
    widx = 0; wr_valid = 1'b0; rd_ready = 1'b0; op = NOP_READ; row = '0; col = '0; nbytes = '0;
    repeat (4) @(posedge clk); rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // erase block 0, check the sequence
    bus.delete();
    run(NOP_ERASE, 0, 0, 0);
    expect_header('{{2'b10, 8'h60}, {2'b01, 8'h00}, {2'b01, 8'h00}, {2'b10, 8'hD0}}, "erase");
    check(bus.size() == 0 && n_erase == 1, "erase: nothing else on the bus");

    // program block 0 page 1
    foreach (pat[i]) pat[i] = 8'($urandom);
    widx = 0; wr_data = pat[0]; bus.delete();
    t0 = int'($time / 62);
    run(NOP_PROGRAM, 1, 0, 2048);
    t1 = int'($time / 62);
    expect_header('{{2'b10, 8'h80}, {2'b01, 8'h00}, {2'b01, 8'h00},
                    {2'b01, 8'h01}, {2'b01, 8'h00}}, "program");
    check(bus.size() == 2049, $sformatf("program: %0d data+command bytes", bus.size()));
    for (int i = 0; i < 2048; i++)
      if (bus[i] != {2'b00, pat[i]}) begin
        check(1'b0, $sformatf("program data %0d: %h expected %h", i, bus[i], pat[i])); break;
      end
    check(bus[2048] == {2'b10, 8'h10}, "program: 10h");
    check(n_prog == 1 && n_err == 0, "program accepted by the flash");
    check(t1 - t0 >= 2 * 2054 + 200, "program takes at least its bus cycles and tPROG");
    bus.delete();

    // read it back with a stalling reader
    rd_q.delete();
    run(NOP_READ, 1, 0, 2048);
    expect_header('{{2'b10, 8'h00}, {2'b01, 8'h00}, {2'b01, 8'h00},
                    {2'b01, 8'h01}, {2'b01, 8'h00}, {2'b10, 8'h30}}, "read");
    check(rd_q.size() == 2048, $sformatf("read %0d bytes", rd_q.size()));
    for (int i = 0; i < 2048 && i < rd_q.size(); i++)
      if (rd_q[i] != pat[i]) begin
        check(1'b0, $sformatf("read data %0d: %h expected %h", i, rd_q[i], pat[i])); break;
      end
    check(rd_q.size() == 2048 && rd_q[2047] == pat[2047], "read data matches");

    // page in block 5 at column 16, 100 bytes
    foreach (pat[i]) pat[i] = 8'($urandom);
    widx = 0; wr_data = pat[0]; bus.delete();
    run(NOP_PROGRAM, 5 * 64 + 3, 16, 100);
    expect_header('{{2'b10, 8'h80}, {2'b01, 8'h10}, {2'b01, 8'h00},
                    {2'b01, 8'h43}, {2'b01, 8'h01}}, "program row 323");
    rd_q.delete(); bus.delete();
    run(NOP_READ, 5 * 64 + 3, 16, 100);
    check(rd_q.size() == 100 && rd_q[0] == pat[0] && rd_q[99] == pat[99], "partial page read");

    // bad-block marks: column 2048 of page 0
    rd_q.delete(); bus.delete();
    run(NOP_READ, 7 * 64, 2048, 1);
    expect_header('{{2'b10, 8'h00}, {2'b01, 8'h00}, {2'b01, 8'h08},
                    {2'b01, 8'hC0}, {2'b01, 8'h01}, {2'b10, 8'h30}}, "bad-block read");
    check(rd_q.size() == 1 && rd_q[0] == 8'h00, "marked block reads 00h");
    rd_q.delete();
    run(NOP_READ, 1 * 64, 2048, 1);
    check(rd_q.size() == 1 && rd_q[0] == 8'hFF, "good block reads FFh");
    check(n_err == 0, "no protocol errors");
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
