// tb_uart_rx: drives serial frames at the nominal rate (and 3 % slow)
// from the testbench and checks each received byte, that a frame with a
// bad stop bit flags frame_err and gives no byte, and that a short glitch
// on the idle line is ignored.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0, nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #31 clk = !clk;
  always @(posedge clk) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nerr++;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic frame(input logic [7:0] b, input logic stop, input int bitlen);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (bitlen) @(negedge clk);
    end
    rxd = 1'b1;
    repeat (bitlen) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int n0;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 30; k++) begin
      b = 8'($urandom); n0 = nvalid;
      frame(b, 1'b1, (k % 2) ? CPB : CPB + 1);
      check(nvalid == n0 + 1 && last == b, $sformatf("byte %h expected %h", last, b));
    end
    n0 = nvalid;
    frame(8'h5A, 1'b0, CPB);
    check(nvalid == n0 && nerr == 1, "bad stop bit flagged");
    repeat (2 * CPB) @(negedge clk);
    rxd = 1'b0; repeat (3) @(negedge clk); rxd = 1'b1;
    repeat (20 * CPB) @(negedge clk);
    check(nvalid == n0 && nerr == 1, "glitch ignored");
    frame(8'hC3, 1'b1, CPB);
    check(nvalid == n0 + 1 && last == 8'hC3, "receives after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
