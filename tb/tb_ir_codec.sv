// tb_ir_codec: transmit side - random serial frames from the testbench
// with bit_start marks; every 0 bit must give one light pulse of
// ceil(3*CPB/16) clocks at the bit start and every 1 bit none. Receive
// side - pulses of 3/16 bit at the bit starts of 0 bits must reproduce the
// serial frame, sampled in the middle of each bit.
module tb_ir_codec;
  localparam int CPB   = 32;
  localparam int PULSE = (3 * CPB + 15) / 16;
  logic clk = 1'b0, rst_n = 1'b0, txd = 1'b1, bit_start = 1'b0, ir_rx = 1'b0;
  logic ir_tx, rxd;
  int checks = 0, failures = 0;

  ir_codec #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #31 clk = !clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] f;
    logic [7:0] b;
    int on_cnt;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // encoder
    for (int k = 0; k < 20; k++) begin
      b = 8'($urandom); f = {1'b1, b, 1'b0};
      for (int i = 0; i < 10; i++) begin
        @(negedge clk); txd = f[i]; bit_start = 1'b1;
        @(negedge clk); bit_start = 1'b0;
        on_cnt = 0;
        for (int c = 1; c < CPB; c++) begin
          if (ir_tx) on_cnt++;
          @(negedge clk);
        end
        if (ir_tx) on_cnt++;
        check(on_cnt == (f[i] ? 0 : PULSE),
              $sformatf("bit %0d=%b: light on %0d clocks", i, f[i], on_cnt));
      end
    end
    txd = 1'b1;
    // decoder
    repeat (3 * CPB) @(negedge clk);
    check(rxd, "idle line high");
    for (int k = 0; k < 20; k++) begin
      logic [9:0] got;
      b = 8'($urandom); f = {1'b1, b, 1'b0};
      for (int i = 0; i < 10; i++) begin
        ir_rx = !f[i];
        repeat (PULSE) @(negedge clk);
        ir_rx = 1'b0;
        repeat (CPB / 2 - PULSE + 3) @(negedge clk);
        got[i] = rxd;
        repeat (CPB - CPB / 2 - 3) @(negedge clk);
      end
      check(got == f, $sformatf("decoded %b expected %b", got, f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
