// tb_channel_gate: steps the channel counter through two full cycles and
// compares MUX1, MUX0, A1 and A0 after each step with the gating truth
// table (channel n = count + 1: MUX1 = count[2], MUX0 = !count[2],
// A1 = count[1], A0 = count[0]); checks that the counter holds without
// `adv` and that both switch enables drop while the sensor supply is off.
module tb_channel_gate;
  logic clk = 1'b0, mclr = 1'b0, onb = 1'b0, adv = 1'b0;
  logic [2:0] count;
  logic mux1, mux0, a1, a0;
  int checks = 0, failures = 0;
  // truth table rows: {MUX1, MUX0, A1, A0} for channels 1..8
  localparam logic [3:0] TT [8] = '{4'b0100, 4'b0101, 4'b0110, 4'b0111,
                                    4'b1000, 4'b1001, 4'b1010, 4'b1011};

  channel_gate dut (.*);

  always #31 clk = !clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check({mux1, mux0} == 2'b00, "both switches off without power");
    mclr = 1'b1; onb = 1'b1;
    for (int k = 0; k < 17; k++) begin
      @(posedge clk); #1;
      check({mux1, mux0, a1, a0} == TT[k % 8],
            $sformatf("step %0d: got %b expected %b", k, {mux1, mux0, a1, a0}, TT[k % 8]));
      repeat (3) @(posedge clk);
      #1 check({mux1, mux0, a1, a0} == TT[k % 8], "holds between steps");
      adv = 1'b1; @(posedge clk); #1 adv = 1'b0;
      repeat (0) @(posedge clk);
      // dut has stepped; loop re-checks after one more clock
      check(count == 3'((k + 1) % 8), "counter stepped");
    end
    onb = 1'b0; @(posedge clk); #1;
    check({mux1, mux0} == 2'b00 && count == 0, "power off clears and disables");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
