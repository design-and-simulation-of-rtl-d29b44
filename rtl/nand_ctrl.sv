// nand_ctrl: command engine for a K9F1G08U0M-type 8-bit NAND flash.
//
// The flash shares one 8-bit I/O bus between commands, addresses and data;
// CLE marks a command byte and ALE an address byte, both latched on the
// rising edge of WE#, and data is read on RE#. This engine runs one
// operation per `req`:
//   NOP_PROGRAM : 80h, col[7:0], col[11:8], row[7:0], row[15:8],
//                 nbytes data bytes pulled from the write stream, 10h,
//                 then waits for R/B# to return high (page program).
//   NOP_READ    : 00h, the same four address bytes, 30h, waits for R/B#,
//                 then reads nbytes bytes with RE# into the read stream.
//   NOP_ERASE   : 60h, row[7:0], row[15:8], D0h, waits for R/B# (block erase).
// The command bytes and their order follow the flash's write, read and
// erase sequences; data is written in one continuous WE#-controlled burst.
// Bus timing is this design's choice: every WE# or RE# cycle takes two
// clocks (62.5 ns low, 62.5 ns high at 16 MHz), read data is captured at
// the end of the RE# low clock, and after the last command byte the engine
// waits WB_CYCLES clocks (tWB) before watching R/B#, which passes a
// two-flop synchroniser. CE# is low for the whole operation.
//
// Streams: wr_ready pulses for one clock when the byte on wr_data is taken
// (wr_valid must be held until then); rd_valid pulses for one clock with a
// byte on rd_data, and a new read cycle starts only while rd_ready is high.
// `busy` is high from req until the cycle after `done`. All pins are
// registered.
module nand_ctrl
  import dts_pkg::*;
#(
  parameter int unsigned WB_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // operation
  input  logic             req,
  input  nand_op_e         op,
  input  logic [ROW_W-1:0] row,
  input  logic [COL_W-1:0] col,
  input  logic [12:0]      nbytes,
  output logic             busy,
  output logic             done,
  // write data (program)
  input  logic [7:0]       wr_data,
  input  logic             wr_valid,
  output logic             wr_ready,
  // read data
  output logic [7:0]       rd_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  // flash pins
  output logic [7:0]       io_out,
  output logic             io_oe,
  input  logic [7:0]       io_in,
  output logic             cle,
  output logic             ale,
  output logic             ce_n,
  output logic             re_n,
  output logic             we_n,
  input  logic             rb       // ready (1) / busy (0)
);

  typedef enum logic [2:0] {
    N_IDLE, N_CMD1, N_ADDR, N_DATA_W, N_CMD2, N_WAIT_WB, N_WAIT_RB, N_DATA_R
  } nstate_e;

  nstate_e          state;
  logic             ph;        // 0: strobe low half, 1: strobe high / idle half
  nand_op_e         op_q;
  logic [ROW_W-1:0] row_q;
  logic [COL_W-1:0] col_q;
  logic [12:0]      nb_q, bcnt;
  logic [1:0]       acnt;
  logic [$clog2(WB_CYCLES+1)-1:0] wbcnt;
  logic [1:0]       rb_sync;
  logic             rb_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rb_sync <= '0;
    else        rb_sync <= {rb_sync[0], rb};
  end
  assign rb_s = rb_sync[1];

  function automatic logic [7:0] addr_byte(input logic [1:0] i,
                                           input logic [COL_W-1:0] c,
                                           input logic [ROW_W-1:0] r);
    unique case (i)
      2'd0:    return c[7:0];
      2'd1:    return {{(16-COL_W){1'b0}}, c[COL_W-1:8]};
      2'd2:    return r[7:0];
      default: return r[15:8];
    endcase
  endfunction

  function automatic logic [7:0] cmd2_of(input nand_op_e o);
    unique case (o)
      NOP_READ:    return CMD_READ2;
      NOP_PROGRAM: return CMD_PROG2;
      default:     return CMD_ERASE2;
    endcase
  endfunction

  assign busy     = (state != N_IDLE);
  assign wr_ready = (state == N_DATA_W) && ph && (bcnt != nb_q) && wr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= N_IDLE; ph <= 1'b1; op_q <= NOP_READ;
      row_q <= '0; col_q <= '0; nb_q <= '0; bcnt <= '0; acnt <= '0; wbcnt <= '0;
      io_out <= '0; io_oe <= 1'b0; cle <= 1'b0; ale <= 1'b0;
      ce_n <= 1'b1; re_n <= 1'b1; we_n <= 1'b1;
      rd_data <= '0; rd_valid <= 1'b0; done <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        N_IDLE: begin
          ce_n <= 1'b1;
          if (req) begin
            op_q <= op; row_q <= row; col_q <= col; nb_q <= nbytes; bcnt <= '0;
            ce_n   <= 1'b0;
            cle    <= 1'b1;
            io_oe  <= 1'b1;
            io_out <= (op == NOP_READ)    ? CMD_READ1 :
                      (op == NOP_PROGRAM) ? CMD_PROG1 : CMD_ERASE1;
            we_n   <= 1'b0;
            ph     <= 1'b0;
            state  <= N_CMD1;
          end
        end
        N_CMD1: begin
          if (!ph) begin
            we_n <= 1'b1; ph <= 1'b1;
          end else begin
            cle    <= 1'b0;
            ale    <= 1'b1;
            acnt   <= (op_q == NOP_ERASE) ? 2'd2 : 2'd0;
            io_out <= addr_byte((op_q == NOP_ERASE) ? 2'd2 : 2'd0, col_q, row_q);
            we_n   <= 1'b0; ph <= 1'b0;
            state  <= N_ADDR;
          end
        end
        N_ADDR: begin
          if (!ph) begin
            we_n <= 1'b1; ph <= 1'b1;
          end else if (acnt != 2'd3) begin
            acnt   <= acnt + 1'b1;
            io_out <= addr_byte(acnt + 1'b1, col_q, row_q);
            we_n   <= 1'b0; ph <= 1'b0;
          end else begin
            ale <= 1'b0;
            if (op_q == NOP_PROGRAM) begin
              state <= N_DATA_W;        // ph stays 1: wait for data
            end else begin
              cle    <= 1'b1;
              io_out <= cmd2_of(op_q);
              we_n   <= 1'b0; ph <= 1'b0;
              state  <= N_CMD2;
            end
          end
        end
        N_DATA_W: begin
          if (!ph) begin
            we_n <= 1'b1; ph <= 1'b1;
            bcnt <= bcnt + 1'b1;
          end else if (bcnt == nb_q) begin
            cle    <= 1'b1;
            io_out <= CMD_PROG2;
            we_n   <= 1'b0; ph <= 1'b0;
            state  <= N_CMD2;
          end else if (wr_valid) begin
            io_out <= wr_data;
            we_n   <= 1'b0; ph <= 1'b0;
          end
        end
        N_CMD2: begin
          if (!ph) begin
            we_n <= 1'b1; ph <= 1'b1;
          end else begin
            cle   <= 1'b0;
            io_oe <= 1'b0;
            wbcnt <= '0;
            state <= N_WAIT_WB;
          end
        end
        N_WAIT_WB: begin
          wbcnt <= wbcnt + 1'b1;
          if (wbcnt == $bits(wbcnt)'(WB_CYCLES)) state <= N_WAIT_RB;
        end
        N_WAIT_RB: begin
          if (rb_s) begin
            if (op_q == NOP_READ) begin
              bcnt  <= '0;
              ph    <= 1'b1;
              state <= N_DATA_R;
            end else begin
              done  <= 1'b1;
              ce_n  <= 1'b1;
              state <= N_IDLE;
            end
          end
        end
        N_DATA_R: begin
          if (!ph) begin
            re_n     <= 1'b1; ph <= 1'b1;
            rd_data  <= io_in;
            rd_valid <= 1'b1;
            bcnt     <= bcnt + 1'b1;
          end else if (bcnt == nb_q) begin
            done  <= 1'b1;
            ce_n  <= 1'b1;
            state <= N_IDLE;
          end else if (rd_ready) begin
            re_n <= 1'b0; ph <= 1'b0;
          end
        end
        default: state <= N_IDLE;
      endcase
    end
  end

endmodule
