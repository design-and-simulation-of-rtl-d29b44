// tb_dts_top_full: one complete operation of the recorder with every
// parameter of dts_top at its default: 1024 flash blocks of 64 pages,
// 2048-byte pages, 256-entry sample buffer, 16 MHz clock, 115 200 baud.
// The flash model has blocks 0 and 5 marked bad and realistic read,
// program and erase times (25 us, 200 us, 2 ms). Sequence: supplies on,
// scan of all 1024 blocks (2048 mark reads, 2 bad blocks), host erase of
// one block (block 1, since block 0 is bad), internal trigger at 200 kHz,
// one page (1024 samples) recorded, read-out of the 2048 bytes over the
// infrared link checked sample by sample.
module tb_dts_top_full;
  import dts_pkg::*;
  localparam int CPB = 139;
  logic m16 = 1'b0, mclr = 1'b0;
  logic soff = 1'b1, on = 1'b0, krst = 1'b0, tc = 1'b0;
  logic ona, onb, woff;
  rate_e rate = RATE_200K;
  logic [2:0] trig_ch = 3'd0;
  logic [4:0] threshold = 5'd20;
  logic [3:0] retrig_n = 4'd2;
  logic [16:0] rec_pages = 17'd1;
  logic ext_trig = 1'b0;
  logic mux1, mux0, a1, a0, convst, adc_cs_rd_n, adc_busy;
  logic [11:0] adc_db;
  logic [7:0] flash_io_out, flash_io_in;
  logic flash_io_oe, flash_cle, flash_ale, flash_ce_n, flash_re_n, flash_we_n, flash_rb;
  logic ir_tx, ir_rx;
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

  nand_flash_model #(.PPB(64), .T_R(400), .T_PROG(3200), .T_BERS(32000),
                     .BAD0(0), .BAD1(5)) flash (
    .clk(m16), .io_in(flash_io_out), .io_oe(flash_io_oe), .io_out(flash_io_in),
    .cle(flash_cle), .ale(flash_ale), .ce_n(flash_ce_n), .re_n(flash_re_n),
    .we_n(flash_we_n), .rb(flash_rb), .n_read, .n_prog, .n_erase, .n_err
  );

  logic [7:0] h_tx_data, h_rx_data;
  logic h_tx_valid = 1'b0, h_tx_ready, h_txd, h_bit_start, h_rxd, h_rx_valid, h_rx_err;
  uart_tx  #(.CLKS_PER_BIT(CPB)) h_tx (.clk(m16), .rst_n(mclr), .data(h_tx_data),
    .valid(h_tx_valid), .ready(h_tx_ready), .txd(h_txd), .bit_start(h_bit_start));
  ir_codec #(.CLKS_PER_BIT(CPB)) h_ir (.clk(m16), .rst_n(mclr), .txd(h_txd),
    .bit_start(h_bit_start), .ir_tx(ir_rx), .ir_rx(ir_tx), .rxd(h_rxd));
  uart_rx  #(.CLKS_PER_BIT(CPB)) h_rx (.clk(m16), .rst_n(mclr), .rxd(h_rxd),
    .data(h_rx_data), .valid(h_rx_valid), .frame_err(h_rx_err));

  always #31 m16 = !m16;

  logic [7:0] got [$];
  always @(posedge m16) if (h_rx_valid) got.push_back(h_rx_data);

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_send(input logic [7:0] b);
    while (!h_tx_ready) @(negedge m16);
    h_tx_data = b; h_tx_valid = 1'b1; @(negedge m16); h_tx_valid = 1'b0;
  endtask

  task automatic wait_state(input dts_state_e s, input int maxc);
    int c = 0;
    while (state != s && c < maxc) begin @(negedge m16); c++; end
    check(state == s, $sformatf("reached %s (now %s)", s.name(), state.name()));
  endtask

  initial begin
    repeat (8000000) @(posedge m16);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok = 1;
    logic [2:0] ch, ch_prev;
    logic [11:0] d;
    for (int i = 0; i < 8; i++) vin[i] = 12'(257 * i + 5);
    repeat (3) @(posedge m16);
    mclr = 1'b1;
    soff = 1'b0; @(negedge m16);
    on = 1'b1; @(negedge m16); on = 1'b0;
    krst = 1'b1; @(negedge m16); krst = 1'b0;
    wait_state(ST_READY, 2000000);
    check(n_read == 2048 && bad_count == 2, $sformatf("scan: %0d reads, %0d bad", n_read, bad_count));
    host_send(HOST_ERASE);
    wait_state(ST_LOOP, 100000);
    check(n_erase == 1 && n_err == 0, "one good block erased");
    repeat (5000) @(negedge m16);
    check(state == ST_LOOP, "waits for the trigger");
    vin[0] = 12'hE00;                    // above 20 << 7
    wait_state(ST_SEQ, 5000);
    wait_state(ST_LOW_POWER, 200000);
    check(pages_written == 1 && n_prog == 1 && n_err == 0 && !fifo_overflow,
          "one page programmed");
    check(flash.rd_byte(64, 0) != 8'hFF, "page landed in block 1");
    got.delete();
    host_send(HOST_READ);
    wait_state(ST_READ_DONE, 4000000);
    repeat (20 * CPB) @(negedge m16);
    check(got.size() == 2048, $sformatf("read-out %0d bytes", got.size()));
    for (int i = 0; i < 1024 && 2 * i + 1 < got.size(); i++) begin
      d  = {got[2*i+1][3:0], got[2*i]};
      ch = got[2*i+1][6:4];
      if (d != vin[ch] || (i > 0 && ch != ch_prev + 3'd1)) begin
        if (ok) $display("FAIL sample %0d: ch %0d data %h", i, ch, d);
        ok = 0;
      end
      ch_prev = ch;
    end
    check(ok, "1024 samples in channel order with the right values");
    check(n_bad_conv == 0, "converter driven correctly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
