// tb_trigger_unit: feeds sample sequences and checks the trigger outputs
// against a reference count kept in the testbench: the internal trigger
// rises at the sample that makes retrig_n consecutive exceedances of the
// trigger channel (ADD[11:7] > threshold), is not raised by shorter runs,
// ignores other channels, stays off while disarmed and latches; the
// external trigger reaches NTR through the synchroniser and NTR follows it
// back down (NTR = TR | WCF); retrig_n = 0 disables the internal trigger.
module tb_trigger_unit;
  import dts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0, valid = 1'b0, ext_trig = 1'b0;
  sample_t sample;
  logic [2:0] trig_ch;
  logic [4:0] threshold;
  logic [3:0] retrig_n, count1;
  logic tr, wcf, ntr;
  int checks = 0, failures = 0;

  trigger_unit dut (.*);

  always #31 clk = !clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [2:0] ch, input logic [11:0] d);
    @(negedge clk); valid = 1'b1; sample.ch = ch; sample.data = d;
    @(negedge clk); valid = 1'b0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, ntrig;
    logic hit, exp_tr;
    logic [2:0] c;
    logic [11:0] d;
    ntrig = 0;
    sample = '0; trig_ch = 3'd2; threshold = 5'b10001; retrig_n = 4'd4;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // disarmed: nothing happens
    repeat (8) send(3'd2, 12'hFFF);
    check(!tr && !ntr && count1 == 0, "disarmed");
    // random sequences on all channels, reference model
    for (int t = 0; t < 30; t++) begin
      arm = 1'b0; @(negedge clk); arm = 1'b1;
      retrig_n = 4'(1 + $urandom % 6);
      threshold = 5'($urandom);
      run = 0; exp_tr = 1'b0;
      for (int k = 0; k < 80; k++) begin
        c = 3'(k % 8);
        // mostly near the threshold so runs both break and complete
        d = {threshold + 5'(($urandom % 3 == 0) ? 0 : 1), 7'($urandom)};
        if (threshold == 5'h1F) d = 12'($urandom);
        send(c, d);
        if (c == trig_ch) begin
          hit = d[11:7] > threshold;
          run = hit ? run + 1 : 0;
          if (hit && run >= retrig_n) exp_tr = 1'b1;
        end
        check(tr == exp_tr, $sformatf("trial %0d sample %0d: tr %b expected %b (run %0d need %0d)",
                                      t, k, tr, exp_tr, run, retrig_n));
      end
      @(negedge clk);
      check(ntr == exp_tr, "ntr follows tr");
      if (exp_tr) ntrig++;
    end
    check(ntrig > 5 && ntrig < 30, $sformatf("%0d of 30 trials triggered", ntrig));
    // spike shorter than the retrigger count does not trigger
    arm = 1'b0; @(negedge clk); arm = 1'b1; retrig_n = 4'd3; threshold = 5'd10;
    send(3'd2, 12'hFFF); send(3'd2, 12'hFFF); send(3'd2, 12'h000);
    send(3'd2, 12'hFFF); send(3'd2, 12'hFFF);
    check(!tr && count1 == 2, "interrupted runs do not trigger");
    send(3'd2, 12'hFFF);
    check(tr, "third consecutive exceedance triggers");
    send(3'd2, 12'h000);
    check(tr, "internal trigger latches");
    // disabled internal trigger
    arm = 1'b0; @(negedge clk); arm = 1'b1; retrig_n = 4'd0;
    repeat (10) send(3'd2, 12'hFFF);
    check(!tr && !ntr, "retrig_n = 0 disables the internal trigger");
    // external trigger
    ext_trig = 1'b1;
    repeat (2) @(negedge clk);
    check(wcf, "external trigger synchronised in two clocks");
    @(negedge clk);
    check(ntr && !tr, "NTR from the external trigger");
    ext_trig = 1'b0; repeat (2) @(negedge clk);
    check(!wcf && !ntr, "NTR follows the external trigger back down");
    // both: NTR stays with the latched internal trigger
    retrig_n = 4'd1; threshold = 5'd10;
    send(3'd2, 12'hFFF);
    check(tr && ntr, "NTR from the internal trigger");
    ext_trig = 1'b1; repeat (3) @(negedge clk);
    ext_trig = 1'b0; repeat (3) @(negedge clk);
    check(tr && ntr, "NTR stays with the latched internal trigger");
    arm = 1'b0; @(negedge clk);
    check(!tr && !ntr && count1 == 0, "disarm clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
