// tb_trigger_experiment: the simulated trigger experiment on the whole
// recorder. Signal generator 1 feeds a 2 kHz sine to channels 1-4 and
// generator 2 a 5 kHz rectangle to channels 5-8, both centred on
// mid-scale. The internal trigger watches channel 1 (threshold code 24 on
// ADD[11:7], two consecutive exceedances). At 600 codes of sine amplitude
// the recorder must stay in cyclic sampling; raising the amplitude to 1800
// codes must trigger it. Two 2048-byte pages are then recorded at 200 kHz,
// read out through the infrared link and compared with the generators:
//   - the read-out is the exact, gap-free sequence of conversions the
//     converter model made from the trigger on (kept in a log here);
//   - channels 1-4 show the sine: peak-to-peak within 2 % of 2 x 1800;
//   - channels 5-8 show the rectangle: exactly its two levels, both seen.
// Reduced flash size (4 blocks of 4 pages) and a fast serial link (16
// clocks per bit) keep the run short; the page size, the sample buffer,
// the clock and the rate are the defaults.
module tb_trigger_experiment;
  import dts_pkg::*;
  localparam int CPB = 16, PAGES = 2, NS = PAGES * 1024;
  localparam int A1_LOW = 600, A1_HIGH = 1800, A2 = 1000;
  logic m16 = 1'b0, mclr = 1'b0;
  logic soff = 1'b1, on = 1'b0, krst = 1'b0, tc = 1'b0;
  logic ona, onb, woff;
  rate_e rate = RATE_200K;
  logic [2:0] trig_ch = 3'd0;
  logic [4:0] threshold = 5'd24;
  logic [3:0] retrig_n = 4'd2;
  logic [16:0] rec_pages = 17'(PAGES);
  logic ext_trig = 1'b0;
  logic mux1, mux0, a1, a0, convst, adc_cs_rd_n, adc_busy;
  logic [11:0] adc_db;
  logic [7:0] flash_io_out, flash_io_in;
  logic flash_io_oe, flash_cle, flash_ale, flash_ce_n, flash_re_n, flash_we_n, flash_rb;
  logic ir_tx, ir_rx;
  dts_state_e state;
  logic low_power, trig, int_trig, ext_trig_s, fifo_overflow, flash_full;
  logic [2:0] bad_count;
  logic [16:0] pages_written;
  logic [11:0] vin [8];
  int n_conv, n_bad_conv, n_read, n_prog, n_erase, n_err;
  int checks = 0, failures = 0;

  dts_top #(.CLKS_PER_BIT(CPB), .NUM_BLK(4), .PPB(4)) dut (.*);

  ad7492_model adc (
    .clk(m16), .vin, .mux1, .mux0, .a1, .a0, .convst, .cs_rd_n(adc_cs_rd_n),
    .busy(adc_busy), .db(adc_db), .n_conv, .n_bad(n_bad_conv)
  );

  nand_flash_model #(.PPB(4)) flash (
    .clk(m16), .io_in(flash_io_out), .io_oe(flash_io_oe), .io_out(flash_io_in),
    .cle(flash_cle), .ale(flash_ale), .ce_n(flash_ce_n), .re_n(flash_re_n),
    .we_n(flash_we_n), .rb(flash_rb), .n_read, .n_prog, .n_erase, .n_err
  );

  // host side: serial port and infrared codec of the reader
  logic [7:0] h_tx_data, h_rx_data;
  logic h_tx_valid = 1'b0, h_tx_ready, h_txd, h_bit_start, h_rxd, h_rx_valid, h_rx_err;
  uart_tx  #(.CLKS_PER_BIT(CPB)) h_tx (.clk(m16), .rst_n(mclr), .data(h_tx_data),
    .valid(h_tx_valid), .ready(h_tx_ready), .txd(h_txd), .bit_start(h_bit_start));
  ir_codec #(.CLKS_PER_BIT(CPB)) h_ir (.clk(m16), .rst_n(mclr), .txd(h_txd),
    .bit_start(h_bit_start), .ir_tx(ir_rx), .ir_rx(ir_tx), .rxd(h_rxd));
  uart_rx  #(.CLKS_PER_BIT(CPB)) h_rx (.clk(m16), .rst_n(mclr), .rxd(h_rxd),
    .data(h_rx_data), .valid(h_rx_valid), .frame_err(h_rx_err));

  always #31 m16 = !m16;

  // signal generators, evaluated per 16 MHz clock (62.5 ns) on the falling
  // edge so the converter sees settled inputs
  longint cyc = 0;
  int amp1 = A1_LOW;
  real ph;
  logic [11:0] sine_v, rect_v;
  always @(negedge m16) begin
    cyc++;
    ph = 2.0 * 3.14159265358979 * 2000.0 * real'(cyc) * 62.5e-9;
    sine_v = 12'($rtoi(2048.0 + real'(amp1) * $sin(ph)));
    rect_v = ((cyc % 3200) < 1600) ? 12'(2048 + A2) : 12'(2048 - A2);
    for (int i = 0; i < 4; i++) vin[i] = sine_v;
    for (int i = 4; i < 8; i++) vin[i] = rect_v;
  end

  // every conversion the converter makes: channel and input value, taken
  // at the clock edge where the converter model samples its input
  logic [14:0] conv_log [$];
  logic convst_q = 1'b1;
  always @(posedge m16) begin
    convst_q <= convst;
    if (convst_q && !convst) conv_log.push_back({mux1, a1, a0, vin[{mux1, a1, a0}]});
  end

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
    repeat (3000000) @(posedge m16);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] smp [NS];
    int k, lo [8], hi [8], n_rect_lvl [2];
    bit ok;
    repeat (3) @(posedge m16);
    mclr = 1'b1;
    soff = 1'b0; @(negedge m16);
    on = 1'b1; @(negedge m16); on = 1'b0;
    krst = 1'b1; @(negedge m16); krst = 1'b0;
    wait_state(ST_READY, 100000);
    host_send(HOST_ERASE);
    wait_state(ST_LOOP, 100000);
    // low amplitude: peaks at 2648, ADD[11:7] = 20, below the threshold
    repeat (32000) @(negedge m16);          // 2 ms, four sine periods
    check(state == ST_LOOP && !trig, "no trigger at 600 codes amplitude");
    // raise the generator amplitude: peaks at 3848, ADD[11:7] = 30
    amp1 = A1_HIGH;
    wait_state(ST_SEQ, 16000);
    check(int_trig && !ext_trig_s, "internal trigger on channel 1");
    wait_state(ST_LOW_POWER, 1000000);
    check(pages_written == 17'(PAGES) && !fifo_overflow && n_err == 0 && n_bad_conv == 0,
          "two pages recorded cleanly");
    got.delete();
    host_send(HOST_READ);
    wait_state(ST_READ_DONE, 1000000);
    repeat (20 * CPB) @(negedge m16);
    check(got.size() == 2 * NS, $sformatf("read-out %0d bytes", got.size()));
    if (got.size() != 2 * NS) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    for (int i = 0; i < NS; i++) smp[i] = {got[2*i+1][6:4], got[2*i+1][3:0], got[2*i]};
    // locate the first recorded sample in the conversion log
    k = -1;
    for (int j = 0; j + NS <= conv_log.size() && k < 0; j++) begin
      ok = 1;
      for (int i = 0; i < 16; i++) if (conv_log[j + i] != smp[i]) ok = 0;
      if (ok) k = j;
    end
    check(k >= 0, "recording found in the converter's output");
    ok = (k >= 0);
    for (int i = 0; i < NS && ok; i++)
      if (conv_log[k + i] != smp[i]) begin
        ok = 0;
        $display("FAIL sample %0d: %h, converter gave %h", i, smp[i], conv_log[k + i]);
      end
    check(ok, $sformatf("%0d samples equal the converter's conversions, none lost", NS));
    // waveforms per channel
    for (int c = 0; c < 8; c++) begin lo[c] = 4095; hi[c] = 0; end
    n_rect_lvl = '{0, 0};
    ok = 1;
    for (int i = 0; i < NS; i++) begin
      int c, v;
      c = int'(smp[i][14:12]); v = int'(smp[i][11:0]);
      if (v < lo[c]) lo[c] = v;
      if (v > hi[c]) hi[c] = v;
      if (c >= 4) begin
        if (v == 2048 + A2) n_rect_lvl[1]++;
        else if (v == 2048 - A2) n_rect_lvl[0]++;
        else ok = 0;
      end
    end
    for (int c = 0; c < 4; c++) begin
      real err;
      err = (real'(hi[c] - lo[c]) - 2.0 * A1_HIGH) / (2.0 * A1_HIGH);
      if (err < 0) err = -err;
      $display("channel %0d (sine): %0d..%0d, peak-to-peak error %0.2f %%", c + 1, lo[c], hi[c], 100.0 * err);
      check(err < 0.02, $sformatf("channel %0d sine amplitude within 2 %%", c + 1));
    end
    check(ok && n_rect_lvl[0] > 0 && n_rect_lvl[1] > 0,
          $sformatf("channels 5-8 rectangle: low %0d, high %0d samples", n_rect_lvl[0], n_rect_lvl[1]));
    for (int c = 4; c < 8; c++)
      check(lo[c] == 2048 - A2 && hi[c] == 2048 + A2, $sformatf("channel %0d both levels", c + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
