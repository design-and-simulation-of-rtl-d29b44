// tb_convst_gen: measures the CONVST period and the start strobes at each
// of the three rates. At 16 MHz the periods must be 80, 160 and 320 clocks
// (200, 100 and 50 kHz) with a 50 % duty cycle, one start strobe per
// period on the falling edge, and no activity while onb = 0 or mclr = 0.
module tb_convst_gen;
  import dts_pkg::*;
  logic clk = 1'b0, mclr = 1'b0, onb = 1'b0;
  rate_e rate;
  logic convst, start, convst1, convst2, convst3;
  int checks = 0, failures = 0;

  convst_gen dut (.*);

  always #31 clk = !clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input rate_e r, input int period);
    int t_fall [4];
    int n = 0, high = 0, cyc = 0, starts = 0;
    rate = r;
    repeat (3) @(posedge clk);
    // wait a falling edge to align
    while (!(start)) @(posedge clk);
    while (n < 4) begin
      @(posedge clk); cyc++;
      if (convst) high++;
      if (start) begin t_fall[n] = cyc; n++; starts++; end
    end
    for (int i = 1; i < 4; i++)
      check(t_fall[i] - t_fall[i-1] == period,
            $sformatf("rate %s period %0d expected %0d", r.name(), t_fall[i] - t_fall[i-1], period));
    check(high == 2 * period, $sformatf("rate %s duty: high %0d of %0d", r.name(), high, 4 * period));
  endtask

  initial begin
    int s;
    rate = RATE_50K;
    repeat (5) @(posedge clk);
    s = 0;
    repeat (400) begin @(posedge clk); if (start || !convst) s++; end
    check(s == 0, "no conversions in reset");
    mclr = 1'b1;
    repeat (400) begin @(posedge clk); if (start || !convst) s++; end
    check(s == 0, "no conversions without sensor power");
    onb = 1'b1;
    measure(RATE_200K, 80);
    measure(RATE_100K, 160);
    measure(RATE_50K, 320);
    measure(RATE_200K, 80);
    onb = 1'b0;
    @(posedge clk); @(posedge clk);
    s = 0;
    repeat (400) begin @(posedge clk); if (start) s++; end
    check(s == 0 && convst, "stops when sensor power goes off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
