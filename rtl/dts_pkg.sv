// dts_pkg: types and constants shared by the dynamic-test-system control logic.
//
// Holds the NAND flash command bytes of the K9F1G08U0M (program 80h/10h,
// read 00h/30h, erase 60h/D0h, as used by the recorder), the flash geometry
// (2112-byte pages of which 2048 are data, 64 pages per block, 1024 blocks),
// the flash-controller operation codes, the A/D sample record and the states
// of the recorder's main state machine. The geometry numbers are those of the
// flash part; the operation codes, the sample record layout and the state
// encodings are this design's own choices.
package dts_pkg;

  // NAND command bytes
  localparam logic [7:0] CMD_READ1   = 8'h00;
  localparam logic [7:0] CMD_READ2   = 8'h30;
  localparam logic [7:0] CMD_PROG1   = 8'h80;
  localparam logic [7:0] CMD_PROG2   = 8'h10;
  localparam logic [7:0] CMD_ERASE1  = 8'h60;
  localparam logic [7:0] CMD_ERASE2  = 8'hD0;

  // flash geometry
  localparam int unsigned PAGE_DATA_BYTES = 2048;   // main area of a page
  localparam int unsigned PAGE_BYTES      = 2112;   // main + spare area
  localparam int unsigned PAGES_PER_BLOCK = 64;
  localparam int unsigned NUM_BLOCKS      = 1024;
  localparam int unsigned ROW_W           = 16;     // row address: block*64+page
  localparam int unsigned COL_W           = 12;     // column address 0..2111

  // column of the factory bad-block mark (first byte of the spare area)
  localparam logic [COL_W-1:0] BAD_MARK_COL = 12'd2048;

  // operations accepted by nand_ctrl
  typedef enum logic [1:0] {
    NOP_READ    = 2'd0,   // 00h, col, row, 30h, wait R/B, read N bytes
    NOP_PROGRAM = 2'd1,   // 80h, col, row, N data bytes, 10h, wait R/B
    NOP_ERASE   = 2'd2    // 60h, row, D0h, wait R/B
  } nand_op_e;

  // one converted sample with the channel it was taken from (0..7)
  typedef struct packed {
    logic [2:0]  ch;
    logic [11:0] data;
  } sample_t;

  // sampling-rate selection of convst_gen
  typedef enum logic [1:0] {
    RATE_200K = 2'd0,     // CONVST1
    RATE_100K = 2'd1,     // CONVST2
    RATE_50K  = 2'd2      // CONVST3
  } rate_e;

  // states of the recorder (flow chart of the FPGA program)
  typedef enum logic [3:0] {
    ST_WAIT_POWER = 4'd0,
    ST_BB_SCAN    = 4'd1,
    ST_READY      = 4'd2,
    ST_ERASE      = 4'd3,
    ST_LOOP       = 4'd4,
    ST_SEQ        = 4'd5,
    ST_LOW_POWER  = 4'd6,
    ST_READOUT    = 4'd7,
    ST_READ_DONE  = 4'd8
  } dts_state_e;

  // host commands on the serial link
  localparam logic [7:0] HOST_READ  = 8'h52;   // 'R': send the recorded pages
  localparam logic [7:0] HOST_ERASE = 8'h45;   // 'E': erase and re-arm

endpackage
