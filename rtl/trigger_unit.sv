// trigger_unit: internal, multiple-retrigger and external trigger.
//
// Internal trigger: while armed, every converted sample of the trigger
// channel `trig_ch` has its five most significant bits (ADD[11:7])
// compared with the 5-bit threshold. A sample above the threshold
// increments the comparison counter count1; a sample at or below it clears
// count1. When count1 reaches `retrig_n` consecutive exceedances the
// internal trigger TR is raised. With retrig_n = 1 this is the plain
// internal trigger; with a larger value it is the multiple-retrigger mode
// that rejects single spikes. retrig_n = 0 disables the internal trigger.
// External trigger: WCF is the level from the external trigger input,
// passed through a two-flop synchroniser (it is low while the trigger pin
// is grounded, high once it is opened). NTR = TR | WCF, a plain OR of the
// two: it follows WCF, and it stays high with TR, which latches once raised
// until the unit is disarmed (arm = 0). Disarming also clears count1.
// Samples of other channels leave count1 unchanged.
// The OR of the two triggers, the five compared bits and the consecutive
// count follow the recorder's description; the strict "greater than"
// comparison, the choice of one trigger channel, the disable value and the
// latching of TR are this design's choices.
module trigger_unit
  import dts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arm,         // cyclic-sampling state: triggers armed
  input  logic        valid,       // new sample
  input  sample_t     sample,
  input  logic [2:0]  trig_ch,     // channel watched by the internal trigger
  input  logic [4:0]  threshold,   // compared with sample.data[11:7]
  input  logic [3:0]  retrig_n,    // consecutive exceedances needed
  input  logic        ext_trig,    // external trigger pin (asynchronous)
  output logic [3:0]  count1,      // internal trigger comparison count
  output logic        tr,          // internal trigger
  output logic        wcf,         // external trigger, synchronised
  output logic        ntr          // trigger = tr | wcf
);

  logic [1:0] ext_sync;
  logic       hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[0], ext_trig};
  end
  assign wcf = ext_sync[1];

  assign hit = sample.data[11:7] > threshold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count1 <= '0;
      tr     <= 1'b0;
    end else if (!arm) begin
      count1 <= '0;
      tr     <= 1'b0;
    end else begin
      if (valid && sample.ch == trig_ch && retrig_n != 0) begin
        if (!hit)                      count1 <= '0;
        else if (count1 != 4'hF)       count1 <= count1 + 1'b1;
        if (hit && count1 + 1'b1 >= retrig_n) tr <= 1'b1;
      end
    end
  end

  assign ntr = tr || wcf;

endmodule
