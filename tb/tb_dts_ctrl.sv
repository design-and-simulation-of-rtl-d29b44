// tb_dts_ctrl: the recorder state machine with a real nand_ctrl, a
// sample_fifo and the behavioural flash (8 blocks of 4 pages, 32 data
// bytes per page, block 2 marked bad). Follows one whole pass and checks
// every state change: bad-block scan (16 one-byte reads, one bad block
// found), host erase of the good blocks needed for 10 pages (blocks 0, 1
// and 3), cyclic sampling with the trigger armed and nothing stored,
// sequential sampling of a counted sample stream into 10 pages skipping
// the bad block, low power, read-out of exactly the stored bytes in the
// two-byte sample format, reading completion, a second read, erase and
// re-arm, and a recording larger than the flash that stops at the 28
// good pages with flash_full. The flash model counts any program or erase
// of the bad block and any program of a byte that was not erased.
module tb_dts_ctrl;
  import dts_pkg::*;
  localparam int NB = 8, PPB = 4, PD = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic power_up = 1'b0, ntr = 1'b0;
  logic [16:0] rec_pages;
  dts_state_e state;
  logic arm, rec_en, low_power;
  sample_t fifo_data, s_in;
  logic fifo_empty, fifo_rd, fifo_clr, s_wr, f_full, f_ovf;
  logic [6:0] f_level;
  logic [7:0] host_cmd = '0, tx_data;
  logic host_cmd_valid = 1'b0, tx_valid, tx_ready;
  logic n_req, n_done, n_busy, n_wr_valid, n_wr_ready, n_rd_valid, n_rd_ready;
  nand_op_e n_op;
  logic [ROW_W-1:0] n_row;
  logic [COL_W-1:0] n_col;
  logic [12:0] n_nb;
  logic [7:0] n_wr_data, n_rd_data, io_out, io_in;
  logic io_oe, cle, ale, ce_n, re_n, we_n, rb;
  logic [3:0] bad_count;
  logic [16:0] pages_written;
  logic flash_full;
  int n_read, n_prog, n_erase, n_err;
  int checks = 0, failures = 0;

  dts_ctrl #(.NUM_BLK(NB), .PPB(PPB), .PAGE_DATA(PD), .BB_COL(2048)) dut (
    .clk, .rst_n, .power_up, .rec_pages, .state, .arm, .ntr, .rec_en, .low_power,
    .fifo_data, .fifo_empty, .fifo_rd, .fifo_clr,
    .host_cmd, .host_cmd_valid, .tx_data, .tx_valid, .tx_ready,
    .nand_req(n_req), .nand_op(n_op), .nand_row(n_row), .nand_col(n_col),
    .nand_nbytes(n_nb), .nand_done(n_done),
    .nand_wr_data(n_wr_data), .nand_wr_valid(n_wr_valid), .nand_wr_ready(n_wr_ready),
    .nand_rd_data(n_rd_data), .nand_rd_valid(n_rd_valid), .nand_rd_ready(n_rd_ready),
    .bad_count, .pages_written, .flash_full
  );

  sample_fifo #(.DEPTH(64)) fifo (
    .clk, .rst_n, .clr(fifo_clr), .wr_en(s_wr), .wr_data(s_in), .rd_en(fifo_rd),
    .rd_data(fifo_data), .empty(fifo_empty), .full(f_full), .overflow(f_ovf), .level(f_level)
  );

  nand_ctrl u_nand (
    .clk, .rst_n, .req(n_req), .op(n_op), .row(n_row), .col(n_col), .nbytes(n_nb),
    .busy(n_busy), .done(n_done),
    .wr_data(n_wr_data), .wr_valid(n_wr_valid), .wr_ready(n_wr_ready),
    .rd_data(n_rd_data), .rd_valid(n_rd_valid), .rd_ready(n_rd_ready),
    .io_out, .io_oe, .io_in, .cle, .ale, .ce_n, .re_n, .we_n, .rb
  );

  nand_flash_model #(.PPB(PPB), .T_R(20), .T_PROG(100), .T_BERS(150), .BAD0(2)) flash (
    .clk, .io_in(io_out), .io_oe, .io_out(io_in), .cle, .ale, .ce_n,
    .re_n, .we_n, .rb, .n_read, .n_prog, .n_erase, .n_err
  );

  always #31 clk = !clk;

  // sample source: one sample every 10 clocks while recording
  int scnt = 0, sdiv = 0;
  sample_t sent [$];
  always @(posedge clk) begin
    s_wr <= 1'b0;
    sdiv <= (sdiv == 9) ? 0 : sdiv + 1;
    if (rec_en && sdiv == 9) begin
      s_wr <= 1'b1;
      s_in <= '{ch: 3'(scnt), data: 12'(scnt * 37)};
      sent.push_back('{ch: 3'(scnt), data: 12'(scnt * 37)});
      scnt <= scnt + 1;
    end
  end

  // host: takes a byte when ready, stalls at random
  logic [7:0] got [$];
  always @(posedge clk) begin
    tx_ready <= ($urandom % 4) == 0;
    if (tx_valid && tx_ready) got.push_back(tx_data);
  end

  // no flash programs outside sequential sampling
  always @(posedge clk)
    if (n_req && n_op == NOP_PROGRAM && state != ST_SEQ) begin
      failures++; $display("FAIL program outside ST_SEQ");
    end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host(input logic [7:0] b);
    @(negedge clk); host_cmd = b; host_cmd_valid = 1'b1;
    @(negedge clk); host_cmd_valid = 1'b0;
  endtask

  task automatic wait_state(input dts_state_e s, input int maxc);
    int c = 0;
    while (state != s && c < maxc) begin @(negedge clk); c++; end
    check(state == s, $sformatf("reached %s (now %s)", s.name(), state.name()));
  endtask

  task automatic check_readout(input int pages);
    int nbytes = pages * PD;
    bit ok = 1;
    check(got.size() == nbytes, $sformatf("read-out %0d bytes, expected %0d", got.size(), nbytes));
    for (int i = 0; i < nbytes / 2 && i < got.size() / 2; i++) begin
      if (got[2*i] != sent[i].data[7:0] ||
          got[2*i+1] != {1'b0, sent[i].ch, sent[i].data[11:8]}) begin
        if (ok) $display("FAIL sample %0d: %h %h expected %p (of %0d)", i, got[2*i], got[2*i+1], sent[i], sent.size());
        ok = 0;
      end
    end
    check(ok, "read-out bytes match the recorded samples");
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, p0, r0;
    rec_pages = 17'd10;
    repeat (4) @(posedge clk); rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check(state == ST_WAIT_POWER && n_read == 0, "waits for power");
    power_up = 1'b1;
    wait_state(ST_READY, 20000);
    check(n_read == 2 * NB, $sformatf("scan read %0d bytes", n_read));
    check(bad_count == 1, "one bad block found");
    repeat (50) @(negedge clk);
    check(state == ST_READY && n_erase == 0, "no erase without the host");
    host(HOST_ERASE);
    wait_state(ST_LOOP, 20000);
    check(n_erase == 3 && n_err == 0, $sformatf("erased %0d blocks", n_erase));
    check(arm && !rec_en, "armed in cyclic sampling");
    repeat (500) @(negedge clk);
    check(state == ST_LOOP && n_prog == 0 && sent.size() == 0, "nothing stored before the trigger");
    ntr = 1'b1; @(negedge clk); ntr = 1'b0;
    wait_state(ST_LOW_POWER, 200000);
    check(n_prog == 10 && n_err == 0 && pages_written == 10, $sformatf("%0d pages programmed", n_prog));
    check(!flash_full && !f_ovf, "no overflow, flash not full");
    check(low_power && !rec_en, "low power, recording stopped");
    // pages went to blocks 0, 1 and 3 (rows 0-7, 12-13)
    check(flash.rd_byte(13 * 1, 0) != 8'hFF && flash.rd_byte(8, 0) == 8'hFF &&
          flash.rd_byte(14, 0) == 8'hFF, "bad block 2 skipped by the mapping");
    // read-out
    got.delete();
    host(HOST_READ);
    wait_state(ST_READ_DONE, 400000);
    check_readout(10);
    // read again keeps the data
    got.delete(); e0 = n_erase;
    host(HOST_READ);
    wait_state(ST_READ_DONE, 400000);
    check_readout(10);
    check(n_erase == e0, "reading does not erase");
    // erase and re-arm, then record past the flash size
    host(HOST_ERASE);
    rec_pages = 17'd100;
    wait_state(ST_LOOP, 40000);
    check(n_erase == e0 + 7 && n_err == 0, "second erase covers every good block");
    sent.delete(); @(negedge clk);
    p0 = n_prog;
    ntr = 1'b1; @(negedge clk); ntr = 1'b0;
    wait_state(ST_LOW_POWER, 1000000);
    check(flash_full && pages_written == 28 && n_prog - p0 == 28,
          $sformatf("flash full after %0d pages", pages_written));
    got.delete(); r0 = n_read;
    host(HOST_READ);
    wait_state(ST_READ_DONE, 2000000);
    check_readout(28);
    check(n_read - r0 == 28 && n_err == 0, "read-out of all good pages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
