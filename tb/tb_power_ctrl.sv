// tb_power_ctrl: checks the regulator enables against the power sequence.
// Drives SOFF, ON, KRST and TC and compares ONA, ONB, WOFF and the delay
// counter with the expected sequence: global power-off clears both
// enables asynchronously, ON sets ONA on the clock, KRST sets ONB at once,
// and with TC = 1 ONB falls exactly DELAY+1 clocks after KRST is released
// with WOFF low in that last cycle.
module tb_power_ctrl;
  logic m16 = 1'b0, soff, on, krst, tc;
  logic ona, onb, woff;
  logic [2:0] count;
  int checks = 0, failures = 0;

  power_ctrl #(.DELAY(7)) dut (.*);

  always #31 m16 = !m16;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge m16);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int woff_low_cycles, cyc;
    soff = 1'b1; on = 1'b0; krst = 1'b0; tc = 1'b0;
    #5;
    check(!ona && !onb, "SOFF clears both");
    repeat (3) @(posedge m16);
    #1 soff = 1'b0;
    @(posedge m16); #1;
    check(!ona && !onb, "both off after SOFF release");
    // ON sets ONA on the next clock
    on = 1'b1; #2;
    check(!ona, "ONA waits for the clock");
    @(posedge m16); #1 on = 1'b0;
    check(ona, "ONA set by ON");
    // KRST presets ONB at once
    krst = 1'b1; #2;
    check(onb, "ONB preset asynchronously");
    @(posedge m16); @(posedge m16); #1;
    check(onb && woff, "ONB held while KRST high");
    // TC low: counter held, ONB stays
    krst = 1'b0;
    repeat (20) @(posedge m16);
    #1 check(onb && count == 0 && woff, "counter held while TC = 0");
    // TC high: ONB drops after the delay
    tc = 1'b1;
    cyc = 0; woff_low_cycles = 0;
    while (onb && cyc < 50) begin
      @(negedge m16);
      if (!woff) woff_low_cycles++;
      if (onb) cyc++;
    end
    check(cyc == 8, $sformatf("ONB off after %0d clocks, expected 8", cyc));
    check(woff_low_cycles == 1, "WOFF low for one cycle");
    check(ona, "ONA unaffected by B power-down");
    @(posedge m16); #1;
    check(woff && count == 0, "WOFF back high, counter cleared");
    // KRST again, then SOFF asynchronously clears both
    tc = 1'b0; krst = 1'b1; #2; krst = 1'b0;
    check(onb, "ONB on again");
    #3 soff = 1'b1; #2;
    check(!ona && !onb, "global power-off is asynchronous");
    // SOFF wins over KRST
    krst = 1'b1; #2;
    check(!onb, "SOFF has priority over KRST");
    krst = 1'b0; #2 soff = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
