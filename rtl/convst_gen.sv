// convst_gen: A/D conversion-start clock with a selectable sampling rate.
//
// Three free-running divider counters (count1, count2, count3) divide the
// 16 MHz system clock down to square waves of 200 kHz (CONVST1), 100 kHz
// (CONVST2) and 50 kHz (CONVST3); `rate` picks the one driven to the
// AD7492's CONVST pin. Each counter counts 0..N/2-1 and toggles its output
// when it wraps, N = CLK_HZ / rate (80, 160 and 320 at the defaults). The
// converter starts on the falling edge of CONVST, so `start` pulses for one
// clock when the selected wave falls; it tells the A/D read-out which
// conversion is in flight. The dividers run while mclr (active-low reset)
// is high and the sensor supply is on (onb); otherwise they are held at
// zero with CONVST high. The three rates, the 16 MHz clock, the divider
// counters and mclr/onb come from the recorder's description; the 50 % duty
// cycle and the start strobe are this design's choices.
module convst_gen
  import dts_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 16_000_000,
  parameter int unsigned RATE1_HZ = 200_000,
  parameter int unsigned RATE2_HZ = 100_000,
  parameter int unsigned RATE3_HZ = 50_000
) (
  input  logic  clk,      // M16
  input  logic  mclr,     // active-low reset
  input  logic  onb,      // sensor supply on: dividers run
  input  rate_e rate,     // which rate drives CONVST
  output logic  convst,   // to the converter, conversion starts on its fall
  output logic  start,    // one-cycle strobe at the fall of convst
  output logic  convst1,  // 200 kHz wave
  output logic  convst2,  // 100 kHz wave
  output logic  convst3   // 50 kHz wave
);

  localparam int unsigned H1 = CLK_HZ / RATE1_HZ / 2;
  localparam int unsigned H2 = CLK_HZ / RATE2_HZ / 2;
  localparam int unsigned H3 = CLK_HZ / RATE3_HZ / 2;
  localparam int unsigned W  = $clog2(H3 + 1);

  logic [W-1:0] count1, count2, count3;
  logic         run, convst_q;

  assign run = mclr && onb;

  always_ff @(posedge clk or negedge mclr) begin
    if (!mclr) begin
      count1 <= '0; count2 <= '0; count3 <= '0;
      convst1 <= 1'b1; convst2 <= 1'b1; convst3 <= 1'b1;
    end else if (!run) begin
      count1 <= '0; count2 <= '0; count3 <= '0;
      convst1 <= 1'b1; convst2 <= 1'b1; convst3 <= 1'b1;
    end else begin
      if (count1 == W'(H1 - 1)) begin count1 <= '0; convst1 <= !convst1; end
      else                            count1 <= count1 + 1'b1;
      if (count2 == W'(H2 - 1)) begin count2 <= '0; convst2 <= !convst2; end
      else                            count2 <= count2 + 1'b1;
      if (count3 == W'(H3 - 1)) begin count3 <= '0; convst3 <= !convst3; end
      else                            count3 <= count3 + 1'b1;
    end
  end

  always_comb begin
    unique case (rate)
      RATE_200K: convst = convst1;
      RATE_100K: convst = convst2;
      default:   convst = convst3;
    endcase
  end

  always_ff @(posedge clk or negedge mclr) begin
    if (!mclr) convst_q <= 1'b1;
    else       convst_q <= convst;
  end

  assign start = convst_q && !convst;

endmodule
