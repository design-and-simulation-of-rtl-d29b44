// dts_ctrl: main state machine of the storage-type dynamic test recorder.
//
// Flow (one pass):
//   ST_WAIT_POWER  wait for the power-up signal (sensor supply on).
//   ST_BB_SCAN     build the bad-block table: for every block read the byte
//                  at column BB_COL (first spare byte) of pages 0 and 1; a
//                  value other than FFh marks the block bad.
//   ST_READY       wait for the host: 'E' starts an erase, 'R' reads out
//                  what an earlier recording left in the flash (data is
//                  erased only on the host's command).
//   ST_ERASE       erase good blocks from block 0 upwards until they hold
//                  rec_pages pages.
//   ST_LOOP        cyclic sampling: conversions run, the trigger is armed,
//                  nothing is stored.
//   ST_SEQ         sequential sampling: from the trigger on, samples leave
//                  the FIFO two bytes each and are programmed page after
//                  page, until rec_pages pages (the preset capacity) are
//                  written or the good blocks run out.
//   ST_LOW_POWER   recording over; `low_power` tells the supply logic that
//                  only the controllers and the flash need power. Waits for
//                  the host's 'R'.
//   ST_READOUT     read the written pages and send every byte to the host.
//   ST_READ_DONE   reading completion: 'R' reads again, 'E' erases and
//                  returns to cyclic sampling.
// Bad blocks are covered by address mapping: erase, program and read-out
// all walk the blocks in ascending order and skip those the table marks,
// so logical page n always lands on the same physical page.
//
// Byte format in flash: each sample is two bytes, data[7:0] first, then
// {0, channel[2:0], data[11:8]}; a page holds PAGE_DATA bytes.
// The states, the bad-block rule, the command sequences and the stop at a
// preset capacity follow the recorder's description; the host command
// bytes, the READY state, the sample byte format and the sequential
// block mapping are this design's choices.
//
// Interface: one clock domain. nand_* drive a nand_ctrl; fifo_* read a
// sample_fifo that the A/D side fills while rec_en is high; host_cmd is a
// received byte, tx_* a byte stream to the serial transmitter.
module dts_ctrl
  import dts_pkg::*;
#(
  parameter int unsigned NUM_BLK   = 1024,
  parameter int unsigned PPB       = 64,      // pages per block
  parameter int unsigned PAGE_DATA = 2048,    // bytes programmed per page
  parameter int unsigned BB_COL    = 2048     // column of the bad-block mark
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             power_up,     // supply on
  input  logic [16:0]      rec_pages,    // preset capacity, in pages
  output dts_state_e       state,
  output logic             arm,          // trigger armed (cyclic sampling)
  input  logic             ntr,          // trigger
  output logic             rec_en,       // store samples into the FIFO
  output logic             low_power,
  // sample FIFO
  input  sample_t          fifo_data,
  input  logic             fifo_empty,
  output logic             fifo_rd,
  output logic             fifo_clr,
  // host link
  input  logic [7:0]       host_cmd,
  input  logic             host_cmd_valid,
  output logic [7:0]       tx_data,
  output logic             tx_valid,
  input  logic             tx_ready,
  // flash command engine
  output logic             nand_req,
  output nand_op_e         nand_op,
  output logic [ROW_W-1:0] nand_row,
  output logic [COL_W-1:0] nand_col,
  output logic [12:0]      nand_nbytes,
  input  logic             nand_done,
  output logic [7:0]       nand_wr_data,
  output logic             nand_wr_valid,
  input  logic             nand_wr_ready,
  input  logic [7:0]       nand_rd_data,
  input  logic             nand_rd_valid,
  output logic             nand_rd_ready,
  // status
  output logic [$clog2(NUM_BLK+1)-1:0] bad_count,
  output logic [16:0]      pages_written,
  output logic             flash_full    // good blocks ran out while recording
);

  localparam int unsigned BW = $clog2(NUM_BLK);
  localparam int unsigned PW = $clog2(PPB);

  logic [NUM_BLK-1:0] bad;           // bad-block table
  logic [BW-1:0]      blk;
  logic [PW-1:0]      pg;
  logic               issued;        // operation requested, waiting for done
  logic               seek;          // walking past bad blocks
  logic               scan_pg;       // page 0 / 1 of the bad-block check
  logic [16:0]        pcnt;          // pages handled in this phase
  logic [16:0]        rd_pages;      // pages to read out
  logic               bsel;          // second byte of a sample
  logic [7:0]         hold;          // byte waiting for the transmitter
  logic               hold_valid;
  logic               last_blk;

  assign last_blk = (blk == BW'(NUM_BLK - 1));

  assign arm       = (state == ST_LOOP);
  assign rec_en    = (state == ST_SEQ);
  assign low_power = (state == ST_LOW_POWER);
  assign fifo_clr  = (state == ST_LOOP);     // start every recording empty

  // program data from the FIFO
  assign nand_wr_valid = (state == ST_SEQ) && !fifo_empty;
  assign nand_wr_data  = bsel ? {1'b0, fifo_data.ch, fifo_data.data[11:8]}
                              : fifo_data.data[7:0];
  assign fifo_rd       = nand_wr_ready && bsel;

  // read data towards the host, one byte held at a time
  assign nand_rd_ready = (state == ST_BB_SCAN) ||
                         ((state == ST_READOUT) && !hold_valid && !nand_rd_valid);
  assign tx_data  = hold;
  assign tx_valid = hold_valid;

  assign nand_row = ROW_W'(blk) * ROW_W'(PPB) + ROW_W'(pg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bsel <= 1'b0;
    end else if (state != ST_SEQ) begin
      bsel <= 1'b0;
    end else if (nand_wr_ready) begin
      bsel <= !bsel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0; hold_valid <= 1'b0;
    end else if (state == ST_READOUT && nand_rd_valid) begin
      hold <= nand_rd_data; hold_valid <= 1'b1;
    end else if (hold_valid && tx_ready) begin
      hold_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_WAIT_POWER;
      bad <= '0; bad_count <= '0;
      blk <= '0; pg <= '0; issued <= 1'b0; seek <= 1'b0; scan_pg <= 1'b0;
      pcnt <= '0; rd_pages <= '0; pages_written <= '0; flash_full <= 1'b0;
      nand_req <= 1'b0; nand_op <= NOP_READ; nand_col <= '0; nand_nbytes <= '0;
    end else begin
      nand_req <= 1'b0;
      unique case (state)
        ST_WAIT_POWER: if (power_up) begin
          blk <= '0; pg <= '0; scan_pg <= 1'b0; issued <= 1'b0;
          bad <= '0; bad_count <= '0;
          state <= ST_BB_SCAN;
        end

        ST_BB_SCAN: begin
          if (!issued) begin
            nand_req    <= 1'b1;
            nand_op     <= NOP_READ;
            nand_col    <= COL_W'(BB_COL);
            nand_nbytes <= 13'd1;
            pg          <= PW'(scan_pg);
            issued      <= 1'b1;
          end else begin
            if (nand_rd_valid && nand_rd_data != 8'hFF && !bad[blk]) begin
              bad[blk]  <= 1'b1;
              bad_count <= bad_count + 1'b1;
            end
            if (nand_done) begin
              issued <= 1'b0;
              if (!scan_pg) scan_pg <= 1'b1;
              else begin
                scan_pg <= 1'b0;
                if (last_blk) begin
                  pg    <= '0;
                  rd_pages <= rec_pages;
                  state <= ST_READY;
                end else blk <= blk + 1'b1;
              end
            end
          end
        end

        ST_READY: if (host_cmd_valid) begin
          if (host_cmd == HOST_ERASE) begin
            blk <= '0; pcnt <= '0; seek <= 1'b1; issued <= 1'b0;
            state <= ST_ERASE;
          end else if (host_cmd == HOST_READ) begin
            blk <= '0; pg <= '0; pcnt <= '0; seek <= 1'b1; issued <= 1'b0;
            state <= ST_READOUT;
          end
        end

        ST_ERASE: begin
          if (pcnt >= rec_pages) begin
            state <= ST_LOOP;
          end else if (seek) begin
            if (!bad[blk])      seek <= 1'b0;
            else if (last_blk) state <= ST_LOOP;   // no good block left
            else                blk <= blk + 1'b1;
          end else if (!issued) begin
            nand_req <= 1'b1;
            nand_op  <= NOP_ERASE;
            pg       <= '0;
            issued   <= 1'b1;
          end else if (nand_done) begin
            issued <= 1'b0;
            pcnt   <= pcnt + 17'(PPB);
            if (last_blk) state <= ST_LOOP;
            else begin
              blk  <= blk + 1'b1;
              seek <= 1'b1;
            end
          end
        end

        ST_LOOP: if (ntr) begin
          blk <= '0; pg <= '0; pcnt <= '0; seek <= 1'b1; issued <= 1'b0;
          flash_full <= 1'b0;
          state <= ST_SEQ;
        end

        ST_SEQ: begin
          if (pcnt >= rec_pages) begin
            pages_written <= pcnt;
            rd_pages      <= pcnt;
            state         <= ST_LOW_POWER;
          end else if (seek) begin
            if (!bad[blk])     seek <= 1'b0;
            else if (last_blk) begin
              flash_full <= 1'b1;
              pages_written <= pcnt;
              rd_pages      <= pcnt;
              state <= ST_LOW_POWER;
            end else            blk <= blk + 1'b1;
          end else if (!issued) begin
            nand_req    <= 1'b1;
            nand_op     <= NOP_PROGRAM;
            nand_col    <= '0;
            nand_nbytes <= 13'(PAGE_DATA);
            issued      <= 1'b1;
          end else if (nand_done) begin
            issued <= 1'b0;
            pcnt   <= pcnt + 1'b1;
            if (pg != PW'(PPB - 1)) pg <= pg + 1'b1;
            else begin
              pg <= '0;
              if (last_blk) begin
                flash_full    <= 1'b1;
                pages_written <= pcnt + 1'b1;
                rd_pages      <= pcnt + 1'b1;
                state         <= ST_LOW_POWER;
              end else begin
                blk  <= blk + 1'b1;
                seek <= 1'b1;
              end
            end
          end
        end

        ST_LOW_POWER: if (host_cmd_valid && host_cmd == HOST_READ) begin
          blk <= '0; pg <= '0; pcnt <= '0; seek <= 1'b1; issued <= 1'b0;
          state <= ST_READOUT;
        end

        ST_READOUT: begin
          if (pcnt >= rd_pages) begin
            if (!hold_valid) state <= ST_READ_DONE;
          end else if (seek) begin
            if (!bad[blk])     seek <= 1'b0;
            else if (last_blk) rd_pages <= pcnt;      // no block left: finish
            else               blk <= blk + 1'b1;
          end else if (!issued) begin
            nand_req    <= 1'b1;
            nand_op     <= NOP_READ;
            nand_col    <= '0;
            nand_nbytes <= 13'(PAGE_DATA);
            issued      <= 1'b1;
          end else if (nand_done) begin
            issued <= 1'b0;
            pcnt   <= pcnt + 1'b1;
            if (pg != PW'(PPB - 1)) pg <= pg + 1'b1;
            else begin
              pg <= '0;
              if (last_blk) rd_pages <= pcnt + 1'b1;   // no block left: finish
              else begin
                blk  <= blk + 1'b1;
                seek <= 1'b1;
              end
            end
          end
        end

        ST_READ_DONE: if (host_cmd_valid) begin
          if (host_cmd == HOST_ERASE) begin
            blk <= '0; pcnt <= '0; seek <= 1'b1; issued <= 1'b0;
            state <= ST_ERASE;
          end else if (host_cmd == HOST_READ) begin
            blk <= '0; pg <= '0; pcnt <= '0; seek <= 1'b1; issued <= 1'b0;
            state <= ST_READOUT;
          end
        end

        default: state <= ST_WAIT_POWER;
      endcase
    end
  end

endmodule
