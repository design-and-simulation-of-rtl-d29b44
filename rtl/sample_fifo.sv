// sample_fifo: first-in first-out buffer between the A/D read-out and the
// flash writer.
//
// A NAND page program keeps the flash busy for up to about 0.7 ms, during
// which conversions go on; this buffer holds the samples until the next
// page can take them. DEPTH entries of sample_t in a memory array with
// read and write pointers one bit wider than the address. Write when
// wr_en && !full; the oldest entry is always visible on rd_data while
// !empty and is removed by rd_en. A write into a full buffer is dropped and
// sets the sticky `overflow` flag, which only rst_n clears. The buffer and
// its depth are this design's choices (256 entries hold 1.28 ms of samples
// at the fastest 200 kHz conversion rate).
module sample_fifo
  import dts_pkg::*;
#(
  parameter int unsigned DEPTH = 256   // power of two
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,         // synchronous flush
  input  logic    wr_en,
  input  sample_t wr_data,
  input  logic    rd_en,
  output sample_t rd_data,
  output logic    empty,
  output logic    full,
  output logic    overflow,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  sample_t       mem [DEPTH];
  logic [AW:0]   wp, rp;

  assign level   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (level == (AW+1)'(DEPTH));
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else if (clr) begin
      wp <= '0; rp <= '0;
    end else begin
      if (wr_en && !full)  wp <= wp + 1'b1;
      if (wr_en && full)   overflow <= 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

endmodule
