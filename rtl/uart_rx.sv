// uart_rx: asynchronous serial receiver of the host command link.
//
// The line passes a two-flop synchroniser. A falling edge starts a frame;
// the start bit is checked half a bit later, then the eight data bits (LSB
// first) and the stop bit are sampled in the middle of each bit,
// CLKS_PER_BIT clocks apart. A frame with a valid stop bit gives a
// one-cycle `valid` with the byte; one with a bad stop bit sets `frame_err`
// for one cycle instead. Frame format and baud rate are this design's
// choices and match uart_tx.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 139
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  rx_state_e     state;
  logic [1:0]    sync;
  logic          rx_s;
  logic [CW-1:0] ccnt;
  logic [2:0]    bidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end
  assign rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE; ccnt <= '0; bidx <= '0; data <= '0;
      valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: if (!rx_s) begin
          ccnt  <= '0;
          state <= R_START;
        end
        R_START: begin
          if (ccnt == CW'(CLKS_PER_BIT / 2)) begin
            ccnt  <= '0;
            bidx  <= '0;
            state <= rx_s ? R_IDLE : R_DATA;   // glitch: back to idle
          end else ccnt <= ccnt + 1'b1;
        end
        R_DATA: begin
          if (ccnt == CW'(CLKS_PER_BIT - 1)) begin
            ccnt <= '0;
            data <= {rx_s, data[7:1]};
            bidx <= bidx + 1'b1;
            if (bidx == 3'd7) state <= R_STOP;
          end else ccnt <= ccnt + 1'b1;
        end
        R_STOP: begin
          if (ccnt == CW'(CLKS_PER_BIT - 1)) begin
            ccnt <= '0;
            if (rx_s) valid <= 1'b1;
            else      frame_err <= 1'b1;
            state <= R_IDLE;
          end else ccnt <= ccnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
