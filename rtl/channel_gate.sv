// channel_gate: cyclic gating of the eight analog channels.
//
// Two 4-channel MAX4634 analog switches feed the single A/D converter. A
// 3-bit channel counter steps once per conversion (`adv`) and is decoded
// into the switch controls exactly as in the gating truth table:
//   MUX1 = count[2], MUX0 = !count[2]  (enable of the upper / lower switch)
//   A1   = count[1], A0   = count[0]   (address inside the switch)
// so count 0..3 select channels 1..4 on the first switch and 4..7 select
// channels 5..8 on the second. The counter is cleared by mclr (active low)
// and held at zero while the sensor supply is off (onb = 0). Outputs are
// decoded from the counter: they change one clock after `adv`, long before the
// next conversion start. Both switch enables are off while onb = 0.
// Stepping on the end of each conversion and the enables off without power are this
// design's choice; the decode follows the truth table.
module channel_gate (
  input  logic                   clk,
  input  logic                   mclr,   // active-low reset
  input  logic                   onb,    // sensor supply on
  input  logic                   adv,    // step to the next channel
  output logic [2:0]             count,  // channel being gated, 0-based
  output logic                   mux1,
  output logic                   mux0,
  output logic                   a1,
  output logic                   a0
);

  always_ff @(posedge clk or negedge mclr) begin
    if (!mclr)                        count <= '0;
    else if (!onb)                    count <= '0;
    else if (adv)                     count <= count + 1'b1;  // wraps 7 -> 0
  end

  assign mux1 = onb &&  count[2];
  assign mux0 = onb && !count[2];
  assign a1   = count[1];
  assign a0   = count[0];

endmodule
