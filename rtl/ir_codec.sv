// ir_codec: infrared pulse codec between the serial link and the infrared
// transceiver.
//
// Encoder: a 0 bit on the serial transmit line becomes a light pulse of
// 3/16 of a bit time at the start of the bit; a 1 bit sends no light
// (IrDA SIR style). The bit boundaries come from uart_tx's `bit_start`.
// Decoder: each rising edge of the (synchronised) receiver output, a light
// pulse, pulls the serial receive line low for one bit time; with no pulse
// the line stays high. The recorder talks to the host over an infrared
// transceiver through such a codec; the 3/16 pulse coding is this design's
// choice. ir_tx and ir_rx are active high (light on).
module ir_codec #(
  parameter int unsigned CLKS_PER_BIT = 139
) (
  input  logic clk,
  input  logic rst_n,
  // transmit side
  input  logic txd,        // serial line from uart_tx
  input  logic bit_start,  // first clock of a bit on txd
  output logic ir_tx,      // to the infrared emitter
  // receive side
  input  logic ir_rx,      // from the infrared receiver
  output logic rxd         // serial line to uart_rx
);

  localparam int unsigned PULSE = (3 * CLKS_PER_BIT + 15) / 16;
  localparam int unsigned CW    = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] tcnt, rcnt;
  logic [2:0]    rsync;

  // encoder
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt <= '0; ir_tx <= 1'b0;
    end else if (bit_start && !txd) begin
      tcnt  <= CW'(PULSE - 1);
      ir_tx <= 1'b1;
    end else if (tcnt != 0) begin
      tcnt <= tcnt - 1'b1;
    end else begin
      ir_tx <= 1'b0;
    end
  end

  // decoder
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsync <= '0; rcnt <= '0; rxd <= 1'b1;
    end else begin
      rsync <= {rsync[1:0], ir_rx};
      if (rsync[1] && !rsync[2]) begin
        rcnt <= CW'(CLKS_PER_BIT - 1);
        rxd  <= 1'b0;
      end else if (rcnt != 0) begin
        rcnt <= rcnt - 1'b1;
      end else begin
        rxd <= 1'b1;
      end
    end
  end

endmodule
