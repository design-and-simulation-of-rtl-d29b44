// adc_if: read-out of the AD7492 12-bit successive-approximation converter.
//
// The converter starts on the falling edge of CONVST (generated by
// convst_gen, which also gives the `start` strobe here) and holds BUSY high
// until the result is ready. This block latches the channel that was gated
// when the conversion started, waits for BUSY to rise and fall again, then
// pulls the joint chip-select/read line (CS and RD are tied together, one
// FPGA pin) low for RD_CYCLES clocks, captures DB11..DB0 on the last of them
// and releases the line. The result leaves as a one-cycle `valid` with the
// sample and its channel; the same pulse steps the channel gate. A `start`
// arriving while a read is still going is ignored. BUSY behaviour and the
// pin set follow the converter's description; the read timing
// (RD_CYCLES = 2, i.e. 125 ns at 16 MHz) and the BUSY time-out
// (BUSY_TIMEOUT clocks, after which the conversion is dropped) are this
// design's choices. BUSY is passed through a two-flop synchroniser.
module adc_if
  import dts_pkg::*;
#(
  parameter int unsigned RD_CYCLES    = 2,
  parameter int unsigned BUSY_TIMEOUT = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,     // conversion started (CONVST fell)
  input  logic [2:0]  ch_in,     // channel gated for this conversion
  input  logic        busy,      // converter BUSY
  input  logic [11:0] db,        // converter data bus
  output logic        cs_rd_n,   // CS and RD of the converter, active low
  output logic        valid,     // one-cycle: sample holds a new result
  output sample_t     sample
);

  typedef enum logic [1:0] {A_IDLE, A_BUSY_HI, A_BUSY_LO, A_READ} adc_state_e;

  localparam int unsigned TW = $clog2(BUSY_TIMEOUT + RD_CYCLES + 1);

  adc_state_e   state;
  logic [TW-1:0] tcnt;
  logic [2:0]   ch_q;
  logic [1:0]   busy_sync;
  logic         busy_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_sync <= '0;
    else        busy_sync <= {busy_sync[0], busy};
  end
  assign busy_s = busy_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= A_IDLE;
      tcnt    <= '0;
      ch_q    <= '0;
      cs_rd_n <= 1'b1;
      valid   <= 1'b0;
      sample  <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        A_IDLE: if (start) begin
          ch_q  <= ch_in;
          tcnt  <= '0;
          state <= A_BUSY_HI;
        end
        A_BUSY_HI: begin
          tcnt <= tcnt + 1'b1;
          if (busy_s)                         begin state <= A_BUSY_LO; tcnt <= '0; end
          else if (tcnt == TW'(BUSY_TIMEOUT)) state <= A_IDLE;
        end
        A_BUSY_LO: begin
          tcnt <= tcnt + 1'b1;
          if (!busy_s) begin
            state   <= A_READ;
            tcnt    <= '0;
            cs_rd_n <= 1'b0;
          end else if (tcnt == TW'(BUSY_TIMEOUT)) state <= A_IDLE;
        end
        A_READ: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == TW'(RD_CYCLES - 1)) begin
            cs_rd_n     <= 1'b1;
            sample.data <= db;
            sample.ch   <= ch_q;
            valid       <= 1'b1;
            state       <= A_IDLE;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
