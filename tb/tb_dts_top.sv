// tb_dts_top: end-to-end run of the whole recorder at reduced sizes
// (8 flash blocks of 4 pages, 32 data bytes per page, 16 clocks per serial
// bit), with behavioural models of the converter with its analog switches
// and of the flash (block 2 marked bad), and a host that talks through its
// own infrared codec and serial port.
//
// Sequence: supplies on (ON, KRST), bad-block scan, host erase, cyclic
// sampling at 200 kHz where a single spike on the trigger channel is
// rejected by the multiple-retrigger count (3) and a lasting level then
// triggers internally; 6 pages recorded; sensor supply switched off by the
// delayed WOFF after checking that low power stops the conversions and
// disables the switches; host read-out checked sample by sample (channel order 1-8
// and each channel's value); host erase again with the sensor supply back
// on; CONVST measured at 100 and 50 kHz; external trigger; a recording
// larger than the flash that stops at the 28 good pages past the bad
// block; read-out; global power-off. Every mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_dts_top;
  import dts_pkg::*;
  localparam int NB = 8, PPB = 4, PD = 32, CPB = 16;
  logic m16 = 1'b0, mclr = 1'b0;
  logic soff = 1'b1, on = 1'b0, krst = 1'b0, tc = 1'b0;
  logic ona, onb, woff;
  rate_e rate = RATE_200K;
  logic [2:0] trig_ch = 3'd3;
  logic [4:0] threshold = 5'd16;
  logic [3:0] retrig_n = 4'd3;
  logic [16:0] rec_pages = 17'd6;
  logic ext_trig = 1'b0;
  logic mux1, mux0, a1, a0, convst, adc_cs_rd_n, adc_busy;
  logic [11:0] adc_db;
  logic [7:0] flash_io_out, flash_io_in;
  logic flash_io_oe, flash_cle, flash_ale, flash_ce_n, flash_re_n, flash_we_n, flash_rb;
  logic ir_tx, ir_rx;
  dts_state_e state;
  logic low_power, trig, int_trig, ext_trig_s, fifo_overflow, flash_full;
  logic [3:0] bad_count;
  logic [16:0] pages_written;
  logic [11:0] vin [8];
  int n_conv, n_bad_conv, n_read, n_prog, n_erase, n_err;
  int checks = 0, failures = 0;

  dts_top #(.CLKS_PER_BIT(CPB), .FIFO_DEPTH(64), .NUM_BLK(NB), .PPB(PPB),
            .PAGE_DATA(PD), .BB_COL(2048)) dut (.*);

  ad7492_model adc (
    .clk(m16), .vin, .mux1, .mux0, .a1, .a0, .convst, .cs_rd_n(adc_cs_rd_n),
    .busy(adc_busy), .db(adc_db), .n_conv, .n_bad(n_bad_conv)
  );

  nand_flash_model #(.PPB(PPB), .T_R(20), .T_PROG(100), .T_BERS(150), .BAD0(2)) flash (
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

  logic [7:0] got [$];
  always @(posedge m16) if (h_rx_valid) got.push_back(h_rx_data);

  // mechanism counters
  int m_ona = 0, m_onb = 0, m_woff = 0, m_soff = 0, m_spike_rejected = 0;
  int m_int_trig = 0, m_ext_trig = 0, m_bad_skip = 0, m_full = 0, m_capacity_stop = 0;
  int m_lp_stop = 0;
  int m_rate [3] = '{0, 0, 0};
  int m_state [9] = '{0, 0, 0, 0, 0, 0, 0, 0, 0};
  int m_chan [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  logic onb_q = 1'b0, ona_q = 1'b0;
  dts_state_e state_q = ST_WAIT_POWER;
  always @(posedge m16) begin
    ona_q <= ona; onb_q <= onb; state_q <= state;
    if (ona && !ona_q) m_ona++;
    if (onb && !onb_q) m_onb++;
    if (!woff && onb) m_woff++;
    if (state != state_q) m_state[state]++;
    if (state == ST_LOOP && int_trig && !$past(int_trig)) m_int_trig++;
    if (state == ST_LOOP && ext_trig_s && !$past(ext_trig_s)) m_ext_trig++;
    if (n_bad_conv != 0) begin failures++; $display("FAIL converter misuse"); end
  end

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

  // convst period at the current rate, in clocks
  task automatic measure_rate(input rate_e r, input int expect_period);
    int t0, t1, k;
    rate = r;
    repeat (2 * expect_period) @(negedge m16);
    k = 0; while (convst && k < 1000) begin @(negedge m16); k++; end
    while (!convst && k < 1000) begin @(negedge m16); k++; end
    t0 = 0;
    while (convst && t0 < 1000) begin @(negedge m16); t0++; end
    t1 = 0;
    while (!convst && t1 < 1000) begin @(negedge m16); t1++; end
    check(t0 + t1 == expect_period, $sformatf("%s: CONVST period %0d expected %0d",
                                              r.name(), t0 + t1, expect_period));
    if (t0 + t1 == expect_period) m_rate[r]++;
  endtask

  // read-out: each sample two bytes; channel order cycles, value per channel
  task automatic check_readout(input int pages, input logic [11:0] exp_v [8]);
    int ns = pages * PD / 2;
    bit ok = 1;
    logic [2:0] ch, ch_prev;
    logic [11:0] d;
    check(got.size() == 2 * ns, $sformatf("read-out %0d bytes, expected %0d", got.size(), 2 * ns));
    for (int i = 0; i < ns && 2 * i + 1 < got.size(); i++) begin
      d  = {got[2*i+1][3:0], got[2*i]};
      ch = got[2*i+1][6:4];
      if (got[2*i+1][7] || d != exp_v[ch] || (i > 0 && ch != ch_prev + 3'd1)) begin
        if (ok) $display("FAIL sample %0d: ch %0d data %h", i, ch, d);
        ok = 0;
      end
      m_chan[ch]++;
      ch_prev = ch;
    end
    check(ok, "recorded samples: channel order and values");
  endtask

  initial begin
    repeat (3000000) @(posedge m16);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] v1 [8];
    int c3;
    for (int i = 0; i < 8; i++) vin[i] = 12'(100 * (i + 1) + i);
    vin[3] = 12'h100;                     // trigger channel below threshold
    repeat (3) @(posedge m16);
    mclr = 1'b1;
    repeat (10) @(negedge m16);
    check(!ona && !onb && state == ST_WAIT_POWER, "all off under SOFF");
    // power on
    soff = 1'b0; @(negedge m16);
    on = 1'b1; @(negedge m16); on = 1'b0;
    krst = 1'b1; @(negedge m16); krst = 1'b0;
    check(ona && onb, "both regulators on");
    m_soff += 0;
    wait_state(ST_READY, 20000);
    check(bad_count == 1, "bad block found by the scan");
    host_send(HOST_ERASE);
    wait_state(ST_LOOP, 20000);
    measure_rate(RATE_200K, 80);
    // a spike on channel 4 lasting one sweep (8 conversions = 640 clocks)
    c3 = n_conv;
    vin[3] = 12'hF00;
    repeat (640) @(negedge m16);
    vin[3] = 12'h100;
    repeat (3000) @(negedge m16);
    check(state == ST_LOOP && !trig, "single spike does not trigger");
    if (state == ST_LOOP && !trig) m_spike_rejected++;
    // lasting level: triggers after three consecutive exceedances
    vin[3] = 12'hF00;
    wait_state(ST_SEQ, 4000);
    check(int_trig && !ext_trig_s, "internal trigger");
    wait_state(ST_LOW_POWER, 200000);
    check(pages_written == 6 && !flash_full && !fifo_overflow, "6 pages recorded");
    if (pages_written == rec_pages) m_capacity_stop++;
    // low power with the supply still on: no conversions, switches disabled
    c3 = n_conv;
    repeat (1000) @(negedge m16);
    check(onb && n_conv == c3 && convst && !mux0 && !mux1,
          $sformatf("low power: %0d conversions, convst %b, mux %b%b", n_conv - c3, convst, mux1, mux0));
    if (onb && n_conv == c3 && convst && !mux0 && !mux1) m_lp_stop++;
    // sensor supply off through the delay counter
    tc = 1'b1;
    repeat (20) @(negedge m16);
    check(!onb && ona, "regulator B off, A on in low power");
    tc = 1'b0;
    v1 = vin;
    got.delete();
    host_send(HOST_READ);
    wait_state(ST_READ_DONE, 400000);
    repeat (20 * CPB) @(negedge m16);
    check_readout(6, v1);
    check(n_err == 0, "flash protocol clean");
    // erase and re-arm with the sensor supply back
    krst = 1'b1; @(negedge m16); krst = 1'b0;
    rec_pages = 17'd40;
    vin[3] = 12'h100;
    host_send(HOST_ERASE);
    wait_state(ST_LOOP, 40000);
    measure_rate(RATE_100K, 160);
    measure_rate(RATE_50K, 320);
    rate = RATE_200K;
    repeat (2000) @(negedge m16);
    check(state == ST_LOOP, "no trigger while quiet");
    ext_trig = 1'b1;
    wait_state(ST_SEQ, 100);
    check(ext_trig_s && !int_trig, "external trigger");
    ext_trig = 1'b0;
    wait_state(ST_LOW_POWER, 1000000);
    check(flash_full && pages_written == 28, $sformatf("full at %0d pages", pages_written));
    if (flash_full) m_full++;
    if (pages_written == 28 && n_err == 0) m_bad_skip++;
    v1 = vin;
    got.delete();
    host_send(HOST_READ);
    wait_state(ST_READ_DONE, 1000000);
    repeat (20 * CPB) @(negedge m16);
    check_readout(28, v1);
    check(n_err == 0 && !fifo_overflow, "flash protocol clean, no overflow");
    // global power-off
    soff = 1'b1; #1;
    check(!ona && !onb, "global power-off");
    if (!ona && !onb) m_soff++;
    @(negedge m16);
    // every mechanism seen
    check(m_ona >= 1 && m_onb >= 2, "regulators switched on");
    check(m_woff >= 1, "delayed regulator B power-down (WOFF)");
    check(m_soff >= 1, "global power-off (SOFF)");
    check(m_rate[RATE_200K] >= 1 && m_rate[RATE_100K] >= 1 && m_rate[RATE_50K] >= 1,
          "all three sampling rates");
    check(m_spike_rejected >= 1, "multiple retrigger rejected a spike");
    check(m_int_trig >= 1 && m_ext_trig >= 1, "internal and external trigger");
    for (int i = 0; i < 8; i++)
      check(m_chan[i] >= 1, $sformatf("channel %0d recorded", i + 1));
    check(m_bad_skip >= 1 && bad_count == 1, "bad block skipped by the mapping");
    check(m_full >= 1 && m_capacity_stop >= 1, "capacity stop and flash-full stop");
    check(m_lp_stop >= 1, "sampling stopped in low power");
    for (int s = int'(ST_BB_SCAN); s <= int'(ST_READ_DONE); s++)
      check(m_state[s] >= 1, $sformatf("state %s entered", dts_state_e'(s)));
    $display("mechanisms: ona %0d onb %0d woff %0d soff %0d spike %0d int %0d ext %0d full %0d",
             m_ona, m_onb, m_woff, m_soff, m_spike_rejected, m_int_trig, m_ext_trig, m_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
