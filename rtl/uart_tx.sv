// uart_tx: asynchronous serial transmitter of the read-out link.
//
// Sends one byte per `valid` when `ready` is high: a start bit (0), eight
// data bits LSB first and a stop bit (1), each CLKS_PER_BIT clocks long
// (139 clocks = 115 200 baud from 16 MHz). `bit_start` pulses on the first
// clock of every bit so that the infrared encoder can place its pulse.
// The line idles high. The recorder sends its data as asynchronous serial
// code; the frame format and baud rate are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 139
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd,
  output logic       bit_start
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [9:0]    shreg;
  logic [3:0]    nbits;     // bits still to send, 0 = idle
  logic [CW-1:0] ccnt;

  assign ready = (nbits == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1; nbits <= '0; ccnt <= '0; txd <= 1'b1; bit_start <= 1'b0;
    end else begin
      bit_start <= 1'b0;
      if (nbits == 0) begin
        txd <= 1'b1;
        if (valid) begin
          shreg     <= {1'b1, data, 1'b0};
          nbits     <= 4'd10;
          ccnt      <= '0;
          txd       <= 1'b0;
          bit_start <= 1'b1;
        end
      end else if (ccnt == CW'(CLKS_PER_BIT - 1)) begin
        ccnt  <= '0;
        nbits <= nbits - 1'b1;
        shreg <= {1'b1, shreg[9:1]};
        if (nbits != 1) begin
          txd       <= shreg[1];
          bit_start <= 1'b1;
        end else begin
          txd <= 1'b1;
        end
      end else begin
        ccnt <= ccnt + 1'b1;
      end
    end
  end

endmodule
