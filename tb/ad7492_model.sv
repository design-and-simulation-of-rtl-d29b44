// ad7492_model: behavioural model of the AD7492 12-bit converter together
// with the two 4:1 analog switches in front of it, for simulation only.
//
// The switch controls pick one of the eight channel values vin[0..7]
// (MUX0 enables channels 1-4, MUX1 channels 5-8, A1/A0 the address). On a
// falling edge of convst the selected value is captured, busy goes high
// after one clock and stays high T_CONV clocks; afterwards db holds the
// result. n_conv counts conversions; n_bad counts a falling convst while
// busy, or both switches enabled at once.
module ad7492_model #(
  parameter int T_CONV = 14        // about 0.9 us at 16 MHz
) (
  input  logic        clk,
  input  logic [11:0] vin [8],
  input  logic        mux1,
  input  logic        mux0,
  input  logic        a1,
  input  logic        a0,
  input  logic        convst,
  input  logic        cs_rd_n,
  output logic        busy,
  output logic [11:0] db,
  output int          n_conv,
  output int          n_bad
);

  logic [11:0] held;
  int          cnt;
  logic        convst_q;

  initial begin
    busy = 1'b0; db = '0; held = '0; cnt = 0; n_conv = 0; n_bad = 0; convst_q = 1'b1;
  end

  always @(posedge clk) begin
    convst_q <= convst;
    if (convst_q && !convst) begin
      if (busy || cnt > 0 || (mux1 && mux0)) n_bad++;
      held   <= mux1 ? vin[{1'b1, a1, a0}] : mux0 ? vin[{1'b0, a1, a0}] : 12'd0;
      cnt    <= T_CONV;
      n_conv++;
    end else if (cnt > 0) begin
      busy <= 1'b1;
      cnt  <= cnt - 1;
      if (cnt == 1) begin
        busy <= 1'b0;
        db   <= held;
      end
    end
  end

  // cs_rd_n only gates the bus on the real part; the model keeps db driven
  wire unused_cs = cs_rd_n;

endmodule
