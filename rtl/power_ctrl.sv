// power_ctrl: enables of the two MAX667 regulators of the test system.
//
// The two regulators give 5 V and 3.3 V for the sensors; the 3.3 V one also
// feeds the recorder's circuit. Regulator A is enabled by ONA, regulator B
// by ONB, taken here as the 5 V and the 3.3 V one in that order. ONA is a D
// flip-flop with an asynchronous clear: it is set by the power-on request ON
// and cleared at once by the global power-off SOFF. ONB is a D flip-flop
// with an asynchronous preset and an asynchronous clear: KRST sets it at
// once, SOFF clears it at once, and it is also cleared on the clock when the
// delay counter raises the power-off strobe of regulator B (WOFF, active
// low).
//
// The delay counter `count` runs on the 16 MHz clock M16 while TC = 1, KRST
// = 0 and ONB = 1; it is held at zero while TC = 0. When it reaches
// DELAY (7) WOFF goes low for one cycle and ONB is cleared; the counter then
// returns to zero, so WOFF goes high again. The structure (the two flip-flop
// kinds, the signal names, the delay counter ending at 7) follows the
// power-sequencing description of the recorder; reading TC as the counter's
// active-low hold and the one-cycle WOFF pulse are this design's choices.
//
// Interface: all inputs are synchronous to m16 except soff and krst, which
// act asynchronously as described. ona, onb and count are registered; woff
// is decoded from the counter in the same cycle.
module power_ctrl #(
  parameter int unsigned DELAY = 7     // delay-counter end value
) (
  input  logic       m16,    // 16 MHz system clock
  input  logic       soff,   // global power-off, active high, asynchronous
  input  logic       on,     // power-on request of regulator A
  input  logic       krst,   // power-on of regulator B, asynchronous preset
  input  logic       tc,     // delay-counter run (0 holds it at zero)
  output logic       ona,    // MAX667_A enable
  output logic       onb,    // MAX667_B enable
  output logic       woff,   // regulator B power-off strobe, active low
  output logic [$clog2(DELAY+1)-1:0] count  // delay counter
);

  localparam int unsigned CW = $clog2(DELAY + 1);

  // regulator A: asynchronous clear
  always_ff @(posedge m16 or posedge soff) begin
    if (soff)    ona <= 1'b0;
    else if (on) ona <= 1'b1;
  end

  // regulator B: asynchronous clear (SOFF) and preset (KRST); the two
  // share one asynchronous load whose value is 0 when SOFF is high (SOFF
  // wins) and 1 otherwise
  logic b_aload;
  assign b_aload = soff || krst;

  always_ff @(posedge m16 or posedge b_aload) begin
    if (b_aload)    onb <= !soff;
    else if (!woff) onb <= 1'b0;
  end

  // delay counter, cleared with the global power-off
  always_ff @(posedge m16 or posedge soff) begin
    if (soff)                          count <= '0;
    else if (!tc || krst || !onb)      count <= '0;
    else if (count == CW'(DELAY))      count <= '0;
    else                               count <= count + 1'b1;
  end

  assign woff = !(onb && tc && !krst && count == CW'(DELAY));

endmodule
