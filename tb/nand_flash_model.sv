// nand_flash_model: behavioural model of a K9F1G08U0M-type 8-bit NAND
// flash for simulation only (not synthesizable).
//
// Commands are latched on the rising edge of we_n while ce_n is low: CLE
// high marks a command byte, ALE high an address byte, neither a data byte.
// Supported: 00h/30h page read (four address cycles: col low, col high, row
// low, row high), 80h/10h page program, 60h/D0h block erase (two row
// cycles). After 30h, 10h or D0h, rb goes low for T_R, T_PROG or T_BERS
// clocks. Read data is put on io_out at each falling edge of re_n from the
// current column, and the column advances on each rising edge of re_n. The
// array is sparse: bytes never written read as FFh. The factory bad-block
// mark (00h at column BB_COL of page 0) is preset for blocks BAD0 and BAD1
// (-1: none). Counters report operations and protocol errors: a program of a
// byte that is not erased, or any program or erase of a marked bad block.
module nand_flash_model #(
  parameter int PPB     = 64,
  parameter int BB_COL  = 2048,
  parameter int T_R     = 400,      // 25 us at 16 MHz
  parameter int T_PROG  = 3200,     // 200 us
  parameter int T_BERS  = 1000,     // shortened erase time
  parameter int BAD0    = -1,
  parameter int BAD1    = -1
) (
  input  logic       clk,
  input  logic [7:0] io_in,     // from the controller
  input  logic       io_oe,
  output logic [7:0] io_out,    // to the controller
  input  logic       cle,
  input  logic       ale,
  input  logic       ce_n,
  input  logic       re_n,
  input  logic       we_n,
  output logic       rb,
  output int         n_read,
  output int         n_prog,
  output int         n_erase,
  output int         n_err
);

  logic [7:0] mem [longint];          // key = row * 4096 + col
  logic [7:0] pbuf [longint];         // page register for program
  logic [7:0] cmd;
  int         acyc, col, row, busy_cnt, blk;
  logic [7:0] last_cmd2;

  function automatic logic [7:0] rd_byte(input int r, input int c);
    longint k = longint'(r) * 4096 + longint'(c);
    if (mem.exists(k)) return mem[k];
    return 8'hFF;
  endfunction

  function automatic bit is_marked(input int blk);
    return (blk == BAD0) || (blk == BAD1);
  endfunction

  initial begin
    rb = 1'b1; io_out = 8'hFF; cmd = 8'h00; acyc = 0; col = 0; row = 0; busy_cnt = 0;
    n_read = 0; n_prog = 0; n_erase = 0; n_err = 0; last_cmd2 = 8'h00;
    if (BAD0 >= 0) mem[longint'(BAD0 * PPB) * 4096 + BB_COL] = 8'h00;
    if (BAD1 >= 0) mem[longint'(BAD1 * PPB) * 4096 + BB_COL] = 8'h00;
  end

  always @(posedge we_n) begin
    if (!ce_n && io_oe) begin
      if (cle) begin
        unique case (io_in)
          8'h00, 8'h80, 8'h60: begin
            cmd = io_in; acyc = 0; col = 0; row = 0;
            if (io_in == 8'h80) pbuf.delete();
          end
          8'h30: begin
            n_read++; busy_cnt = T_R; rb = 1'b0; last_cmd2 = io_in;
          end
          8'h10: begin
            n_prog++;
            if (is_marked(row / PPB)) n_err++;
            foreach (pbuf[k]) begin
              if (rd_byte(row, int'(k)) != 8'hFF) n_err++;
              mem[longint'(row) * 4096 + k] = pbuf[k];
            end
            busy_cnt = T_PROG; rb = 1'b0; last_cmd2 = io_in;
          end
          8'hD0: begin
            blk = row / PPB;
            n_erase++;
            if (is_marked(blk)) n_err++;
            for (int p = 0; p < PPB; p++)
              for (int c = 0; c < 4096; c++)
                if (mem.exists(longint'(blk * PPB + p) * 4096 + c))
                  mem.delete(longint'(blk * PPB + p) * 4096 + c);
            busy_cnt = T_BERS; rb = 1'b0; last_cmd2 = io_in;
          end
          default: n_err++;
        endcase
      end else if (ale) begin
        if (cmd == 8'h60) begin
          if (acyc == 0) row = int'(io_in);
          else           row = row | (int'(io_in) << 8);
        end else begin
          unique case (acyc)
            0: col = int'(io_in);
            1: col = col | (int'(io_in) << 8);
            2: row = int'(io_in);
            default: row = row | (int'(io_in) << 8);
          endcase
        end
        acyc++;
      end else if (cmd == 8'h80) begin
        pbuf[col] = io_in;
        col++;
      end
    end
  end

  always @(posedge re_n) begin
    if (!ce_n) col++;
  end

  always @(negedge re_n) begin
    if (!ce_n) io_out = rd_byte(row, col);
  end

  always @(posedge clk) begin
    if (busy_cnt > 0) begin
      busy_cnt--;
      if (busy_cnt == 0) rb = 1'b1;
    end
  end

endmodule
