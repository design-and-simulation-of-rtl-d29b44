// tb_dts_record: sustained recording at full size. dts_top with default
// parameters records 70 pages (71 680 samples, more than one 64-page
// block) at a selectable conversion rate, against a flash model whose
// page program takes the worst-case 0.7 ms and whose blocks 0 and 2 are
// bad. The converter's channel inputs change with every conversion (a
// counter), so every stored sample can be checked. Checks, read straight
// from the flash model: the pages sit in blocks 1 and 3 (bad blocks
// skipped), every sample follows the channel order and carries the value
// the converter produced for it, no sample is lost (the buffer never
// overflows), and the recording lasts pages x 1024 conversion periods.
// Run twice: at 200 kHz, the fastest rate, where the 0.7 ms program time
// is the hardest on the buffer, and at the 50 kHz rate of the main
// specification.
module tb_dts_record;
  import dts_pkg::*;
  localparam int PAGES = 70;
  logic m16 = 1'b0, mclr = 1'b0;
  logic soff = 1'b1, on = 1'b0, krst = 1'b0, tc = 1'b0;
  logic ona, onb, woff;
  rate_e rate = RATE_200K;
  logic [2:0] trig_ch = 3'd0;
  logic [4:0] threshold = 5'd0;
  logic [3:0] retrig_n = 4'd0;
  logic [16:0] rec_pages = 17'(PAGES);
  logic ext_trig = 1'b0;
  logic mux1, mux0, a1, a0, convst, adc_cs_rd_n, adc_busy;
  logic [11:0] adc_db;
  logic [7:0] flash_io_out, flash_io_in;
  logic flash_io_oe, flash_cle, flash_ale, flash_ce_n, flash_re_n, flash_we_n, flash_rb;
  logic ir_tx, ir_rx = 1'b0;
  dts_state_e state;
  logic low_power, trig, int_trig, ext_trig_s, fifo_overflow, flash_full;
  logic [10:0] bad_count;
  logic [16:0] pages_written;
  logic [11:0] vin [8];
  int n_conv, n_bad_conv, n_read, n_prog, n_erase, n_err;
  int checks = 0, failures = 0;

  dts_top dut (.*);

  ad7492_model adc (
    .clk(m16), .vin, .mux1, .mux0, .a1, .a0, .convst, .cs_rd_n(adc_cs_rd_n),
    .busy(adc_busy), .db(adc_db), .n_conv, .n_bad(n_bad_conv)
  );

  nand_flash_model #(.PPB(64), .T_R(400), .T_PROG(11200), .T_BERS(1000),
                     .BAD0(0), .BAD1(2)) flash (
    .clk(m16), .io_in(flash_io_out), .io_oe(flash_io_oe), .io_out(flash_io_in),
    .cle(flash_cle), .ale(flash_ale), .ce_n(flash_ce_n), .re_n(flash_re_n),
    .we_n(flash_we_n), .rb(flash_rb), .n_read, .n_prog, .n_erase, .n_err
  );

  always #31 m16 = !m16;

  // every channel input = a running value that changes after each conversion
  int conv_seen = 0;
  always @(negedge convst) begin
    conv_seen++;
  end
  always_comb for (int i = 0; i < 8; i++) vin[i] = 12'((conv_seen * 5 + i * 512) & 12'hFFF);

  // host command bytes, sent as infrared pulses (3/16 bit per 0 bit)
  task automatic ir_send(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      ir_rx = !f[i]; repeat (27) @(negedge m16);
      ir_rx = 1'b0;  repeat (139 - 27) @(negedge m16);
    end
  endtask

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_state(input dts_state_e s, input int maxc);
    int c = 0;
    while (state != s && c < maxc) begin @(negedge m16); c++; end
    check(state == s, $sformatf("reached %s (now %s)", s.name(), state.name()));
  endtask

  // the recording, read back from the flash model
  task automatic check_record(input int period);
    bit ok = 1;
    int page_row, blk, n = 0;
    logic [7:0] lo, hi;
    logic [2:0] ch, ch_prev;
    logic [11:0] d, d_prev;
    for (int p = 0; p < PAGES; p++) begin
      // logical page p: blocks 1, 3, 4, ... (0 and 2 bad)
      blk = (p / 64 == 0) ? 1 : 3;
      page_row = blk * 64 + p % 64;
      for (int i = 0; i < 1024; i++) begin
        lo = flash.rd_byte(page_row, 2 * i);
        hi = flash.rd_byte(page_row, 2 * i + 1);
        d = {hi[3:0], lo}; ch = hi[6:4];
        // consecutive conversions: next channel, value 5 higher,
        // offset by 512 per channel step
        if (n > 0 && (ch != ch_prev + 3'd1 || d != 12'(d_prev + 5 + 512))) begin
          if (ok) $display("FAIL page %0d sample %0d: ch %0d %h after ch %0d %h",
                           p, i, ch, d, ch_prev, d_prev);
          ok = 0;
        end
        if (hi[7]) ok = 0;
        ch_prev = ch; d_prev = d; n++;
      end
    end
    check(ok, $sformatf("%0d samples contiguous, in channel order, with their values", n));
    check(flash.rd_byte(0 * 64, 0) == 8'hFF && flash.rd_byte(2 * 64, 0) == 8'hFF,
          "nothing written into the bad blocks");
    check(flash.rd_byte(3 * 64 + 5, 0) != 8'hFF && flash.rd_byte(3 * 64 + 6, 0) == 8'hFF,
          "recording ends on page 6 of block 3");
  endtask

  initial begin
    repeat (40000000) @(posedge m16);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    int periods [2] = '{80, 320};
    rate_e rates [2] = '{RATE_200K, RATE_50K};
    repeat (3) @(posedge m16);
    mclr = 1'b1;
    soff = 1'b0; @(negedge m16);
    on = 1'b1; @(negedge m16); on = 1'b0;
    krst = 1'b1; @(negedge m16); krst = 1'b0;
    wait_state(ST_READY, 2000000);
    check(bad_count == 2, "two bad blocks");
    for (int r = 0; r < 2; r++) begin
      rate = rates[r];
      ir_send(HOST_ERASE);
      wait_state(ST_LOOP, 200000);
      check(n_err == 0, "erase clean");
      repeat (2000) @(negedge m16);
      ext_trig = 1'b1;
      wait_state(ST_SEQ, 100);
      ext_trig = 1'b0;
      t0 = $time;
      wait_state(ST_LOW_POWER, 30000000);
      t1 = $time;
      check(pages_written == 17'(PAGES) && !fifo_overflow && n_err == 0,
            $sformatf("%s: %0d pages, overflow %b", rate.name(), pages_written, fifo_overflow));
      // 70 pages x 1024 samples x period, plus the last page program
      check((t1 - t0) / 62 >= longint'(PAGES) * 1024 * periods[r] &&
            (t1 - t0) / 62 <= longint'(PAGES) * 1024 * periods[r] + 2 * 11200 + 4 * periods[r] * 8,
            $sformatf("%s: recording took %0d clocks", rate.name(), (t1 - t0) / 62));
      check_record(periods[r]);
      ir_send(HOST_READ);           // read-out is not waited for here
      repeat (200) @(negedge m16);
      check(state == ST_READOUT, "read-out starts on the host command");
      // stop it: reset the recorder and start the next round
      mclr = 1'b0; @(negedge m16); mclr = 1'b1;
      wait_state(ST_READY, 2000000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
