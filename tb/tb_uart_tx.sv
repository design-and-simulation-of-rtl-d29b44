// tb_uart_tx: sends random bytes and samples the line in the middle of
// every bit with the testbench's own timing: start bit 0, eight data bits
// LSB first, stop bit 1, CLKS_PER_BIT clocks each; checks `ready` and that
// bit_start pulses once per bit (10 per frame).
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [7:0] data = '0;
  logic ready, txd, bit_start;
  int checks = 0, failures = 0, nstarts = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #31 clk = !clk;
  always @(posedge clk) if (bit_start) nstarts++;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int s0;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(txd && ready, "idle high and ready");
    for (int k = 0; k < 40; k++) begin
      b = 8'($urandom); s0 = nstarts;
      @(negedge clk); data = b; valid = 1'b1;
      @(negedge clk); valid = 1'b0;
      check(!ready, "busy after accepting");
      // we are 1 clock into the start bit; go to its middle
      repeat (CPB / 2 - 1) @(negedge clk);
      check(!txd, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      check(txd, "stop bit");
      check(got == b, $sformatf("byte %h expected %h", got, b));
      while (!ready) @(negedge clk);
      check(nstarts - s0 == 10, $sformatf("%0d bit starts", nstarts - s0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
