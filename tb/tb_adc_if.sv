// tb_adc_if: drives the converter pins by hand. For a series of
// conversions with random channels, values and BUSY lengths it checks that
// the joint CS/RD line stays high until BUSY has fallen, is low for exactly
// two clocks, that one `valid` follows with the value on DB and the channel
// given at `start`, and that the result arrives within 6 clocks of BUSY
// falling. A conversion whose BUSY never rises must give no result.
module tb_adc_if;
  import dts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy = 1'b0;
  logic [2:0] ch_in = '0;
  logic [11:0] db = '0;
  logic cs_rd_n, valid;
  sample_t sample;
  int checks = 0, failures = 0;
  int nvalid = 0, rd_low = 0;
  sample_t last;

  adc_if dut (.*);

  always #31 clk = !clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (valid) begin nvalid++; last = sample; end
    if (!cs_rd_n) rd_low++;
    if (busy && !cs_rd_n) begin failures++; $display("FAIL read while busy"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, lat;
    logic [11:0] v;
    logic [2:0] c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      v = 12'($urandom); c = 3'($urandom);
      n0 = nvalid; rd_low = 0;
      @(negedge clk); start = 1'b1; ch_in = c;
      @(negedge clk); start = 1'b0; ch_in = ~c;   // channel may move on
      repeat (1 + $urandom % 2) @(negedge clk);
      busy = 1'b1; db = ~v;
      repeat (5 + $urandom % 15) @(negedge clk);
      busy = 1'b0; db = v;
      lat = 0;
      while (nvalid == n0 && lat < 20) begin @(negedge clk); lat++; end
      check(nvalid == n0 + 1, $sformatf("conversion %0d gave a result", k));
      check(lat <= 6, $sformatf("latency %0d clocks", lat));
      check(last.data == v && last.ch == c,
            $sformatf("sample %h ch %0d, expected %h ch %0d", last.data, last.ch, v, c));
      check(rd_low == 2, $sformatf("CS/RD low %0d clocks", rd_low));
      repeat (4) @(negedge clk);
    end
    // BUSY never rises: no result, back to idle
    n0 = nvalid;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (100) @(negedge clk);
    check(nvalid == n0, "no result without BUSY");
    // and the next conversion works again
    @(negedge clk); start = 1'b1; ch_in = 3'd5; @(negedge clk); start = 1'b0;
    repeat (2) @(negedge clk); busy = 1'b1; repeat (8) @(negedge clk);
    db = 12'hABC; busy = 1'b0;
    repeat (10) @(negedge clk);
    check(nvalid == n0 + 1 && last.data == 12'hABC && last.ch == 3'd5, "recovers after time-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
