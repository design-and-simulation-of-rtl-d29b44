// dts_top: FPGA control logic of an eight-channel storage-type dynamic
// test recorder.
//
// Signal path: eight conditioned analog channels pass two 4:1 analog
// switches into one 12-bit A/D converter. channel_gate steps the switches
// through the channels, convst_gen starts a conversion at 200, 100 or 50 kHz
// (so each channel is sampled at an eighth of that), adc_if collects the
// result with its channel number. trigger_unit watches the samples for the
// internal (threshold, optionally several times in a row) trigger and ORs it
// with the external trigger. dts_ctrl runs the recorder: bad-block scan,
// erase on the host's command, cyclic sampling until the trigger, then
// sequential sampling through sample_fifo into the NAND flash through
// nand_ctrl until the preset number of pages is written, low power, and
// read-out to the host. The host link is a serial line (uart_rx/uart_tx)
// coded for an infrared transceiver by ir_codec. power_ctrl drives the
// enables of the two supply regulators; its ONB output (sensor supply on)
// is the power-up signal of the recorder and gates the sampling chain.
// Conversions and channel switching run only in cyclic and sequential
// sampling: in every other state (low power and read-out among them)
// CONVST stays high and both analog switches are disabled. Stopping the
// parts that have no work follows the low-power description; tying it to
// these two states is this design's choice.
//
// All logic runs on the 16 MHz system clock m16; mclr is the active-low
// reset. The flash data bus is split into io_out / io_oe / io_in for an
// external tri-state pad. Analog parts, the converter, the switches, the
// regulators, the flash chip and the infrared transceiver are outside.
module dts_top
  import dts_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 16_000_000,
  parameter int unsigned CLKS_PER_BIT = 139,      // 115 200 baud
  parameter int unsigned FIFO_DEPTH   = 256,
  parameter int unsigned NUM_BLK      = 1024,
  parameter int unsigned PPB          = 64,
  parameter int unsigned PAGE_DATA    = 2048,
  parameter int unsigned BB_COL       = 2048
) (
  input  logic        m16,
  input  logic        mclr,
  // supply sequencing
  input  logic        soff,
  input  logic        on,
  input  logic        krst,
  input  logic        tc,
  output logic        ona,
  output logic        onb,
  output logic        woff,
  // configuration
  input  rate_e       rate,
  input  logic [2:0]  trig_ch,
  input  logic [4:0]  threshold,
  input  logic [3:0]  retrig_n,
  input  logic [16:0] rec_pages,
  input  logic        ext_trig,
  // analog switches and converter
  output logic        mux1,
  output logic        mux0,
  output logic        a1,
  output logic        a0,
  output logic        convst,
  output logic        adc_cs_rd_n,
  input  logic        adc_busy,
  input  logic [11:0] adc_db,
  // NAND flash
  output logic [7:0]  flash_io_out,
  output logic        flash_io_oe,
  input  logic [7:0]  flash_io_in,
  output logic        flash_cle,
  output logic        flash_ale,
  output logic        flash_ce_n,
  output logic        flash_re_n,
  output logic        flash_we_n,
  input  logic        flash_rb,
  // infrared transceiver
  output logic        ir_tx,
  input  logic        ir_rx,
  // status
  output dts_state_e  state,
  output logic        low_power,
  output logic        trig,          // trigger (internal | external)
  output logic        int_trig,      // internal trigger alone
  output logic        ext_trig_s,    // external trigger, synchronised
  output logic        fifo_overflow,
  output logic        flash_full,
  output logic [$clog2(NUM_BLK+1)-1:0] bad_count,
  output logic [16:0] pages_written
);

  logic        start, conv1, conv2, conv3;
  logic [2:0]  ch;
  logic        s_valid;
  sample_t     s_data;
  logic        arm, rec_en;
  logic [3:0]  count1;
  sample_t     f_data;
  logic        f_empty, f_full, f_rd, f_clr;
  logic [$clog2(FIFO_DEPTH):0] f_level;
  logic [2:0]  pwr_count;
  logic        n_req, n_busy, n_done, n_wr_valid, n_wr_ready, n_rd_valid, n_rd_ready;
  nand_op_e    n_op;
  logic [ROW_W-1:0] n_row;
  logic [COL_W-1:0] n_col;
  logic [12:0] n_nbytes;
  logic [7:0]  n_wr_data, n_rd_data;
  logic [7:0]  rx_byte, tx_byte;
  logic        rx_valid, rx_err, tx_valid, tx_ready, txd, bit_start, rxd;

  power_ctrl #(.DELAY(7)) u_power (
    .m16(m16), .soff(soff), .on(on), .krst(krst), .tc(tc),
    .ona(ona), .onb(onb), .woff(woff), .count(pwr_count)
  );

  // conversions and channel switching run only while sampling (cyclic or
  // sequential); in every other state they are stopped to save power
  logic samp_on;
  assign samp_on = onb && (arm || rec_en);

  convst_gen #(.CLK_HZ(CLK_HZ)) u_convst (
    .clk(m16), .mclr(mclr), .onb(samp_on), .rate(rate),
    .convst(convst), .start(start),
    .convst1(conv1), .convst2(conv2), .convst3(conv3)
  );

  channel_gate u_gate (
    .clk(m16), .mclr(mclr), .onb(samp_on), .adv(s_valid),
    .count(ch), .mux1(mux1), .mux0(mux0), .a1(a1), .a0(a0)
  );

  adc_if u_adc (
    .clk(m16), .rst_n(mclr), .start(start), .ch_in(ch),
    .busy(adc_busy), .db(adc_db), .cs_rd_n(adc_cs_rd_n),
    .valid(s_valid), .sample(s_data)
  );

  trigger_unit u_trig (
    .clk(m16), .rst_n(mclr), .arm(arm), .valid(s_valid), .sample(s_data),
    .trig_ch(trig_ch), .threshold(threshold), .retrig_n(retrig_n),
    .ext_trig(ext_trig), .count1(count1), .tr(int_trig), .wcf(ext_trig_s), .ntr(trig)
  );

  sample_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(m16), .rst_n(mclr), .clr(f_clr),
    .wr_en(s_valid && rec_en), .wr_data(s_data),
    .rd_en(f_rd), .rd_data(f_data),
    .empty(f_empty), .full(f_full), .overflow(fifo_overflow), .level(f_level)
  );

  dts_ctrl #(
    .NUM_BLK(NUM_BLK), .PPB(PPB), .PAGE_DATA(PAGE_DATA), .BB_COL(BB_COL)
  ) u_ctrl (
    .clk(m16), .rst_n(mclr), .power_up(onb), .rec_pages(rec_pages),
    .state(state), .arm(arm), .ntr(trig), .rec_en(rec_en), .low_power(low_power),
    .fifo_data(f_data), .fifo_empty(f_empty), .fifo_rd(f_rd), .fifo_clr(f_clr),
    .host_cmd(rx_byte), .host_cmd_valid(rx_valid),
    .tx_data(tx_byte), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .nand_req(n_req), .nand_op(n_op), .nand_row(n_row), .nand_col(n_col),
    .nand_nbytes(n_nbytes), .nand_done(n_done),
    .nand_wr_data(n_wr_data), .nand_wr_valid(n_wr_valid), .nand_wr_ready(n_wr_ready),
    .nand_rd_data(n_rd_data), .nand_rd_valid(n_rd_valid), .nand_rd_ready(n_rd_ready),
    .bad_count(bad_count), .pages_written(pages_written), .flash_full(flash_full)
  );

  nand_ctrl u_nand (
    .clk(m16), .rst_n(mclr),
    .req(n_req), .op(n_op), .row(n_row), .col(n_col), .nbytes(n_nbytes),
    .busy(n_busy), .done(n_done),
    .wr_data(n_wr_data), .wr_valid(n_wr_valid), .wr_ready(n_wr_ready),
    .rd_data(n_rd_data), .rd_valid(n_rd_valid), .rd_ready(n_rd_ready),
    .io_out(flash_io_out), .io_oe(flash_io_oe), .io_in(flash_io_in),
    .cle(flash_cle), .ale(flash_ale), .ce_n(flash_ce_n),
    .re_n(flash_re_n), .we_n(flash_we_n), .rb(flash_rb)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(m16), .rst_n(mclr), .rxd(rxd),
    .data(rx_byte), .valid(rx_valid), .frame_err(rx_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(m16), .rst_n(mclr), .data(tx_byte), .valid(tx_valid),
    .ready(tx_ready), .txd(txd), .bit_start(bit_start)
  );

  ir_codec #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_ir (
    .clk(m16), .rst_n(mclr),
    .txd(txd), .bit_start(bit_start), .ir_tx(ir_tx),
    .ir_rx(ir_rx), .rxd(rxd)
  );

endmodule
