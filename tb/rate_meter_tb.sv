// rate_meter_tb: drives random spike trains of varying density and compares
// the moving count with a software window over the last 1024 inputs, one
// cycle after each input; also checks the initial clearing sweep (ready low
// for 1024 cycles, count 0).
module rate_meter_tb;
  import sann_pkg::*;
  logic clk = 1'b0, rst = 1'b1, spike = 1'b0, ready;
  logic [WIN_LOG2:0] rate;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rate_meter dut (.clk(clk), .rst(rst), .spike(spike), .rate(rate), .ready(ready));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [$];
    int ref_cnt, bad, clr_cycles, density;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    clr_cycles = 0; bad = 0;
    @(posedge clk); #1;
    while (!ready && clr_cycles < 5000) begin
      if (rate != 0) bad++;
      clr_cycles++;
      @(posedge clk); #1;
    end
    check(clr_cycles >= 1020 && clr_cycles <= 1025, $sformatf("clear sweep %0d cycles", clr_cycles));
    check(bad == 0, "count is 0 while clearing");
    // measured phase
    ref_cnt = 0; bad = 0;
    for (int t = 0; t < 8000; t++) begin
      density = (t < 2000) ? 5 : (t < 4000) ? 50 : (t < 6000) ? 100 : 1;
      spike <= (($urandom % 100) < density);
      @(posedge clk); #1;
      hist.push_back(spike);
      ref_cnt += int'(spike);
      if (hist.size() > 1024) ref_cnt -= int'(hist.pop_front());
      @(negedge clk);
      if (int'(rate) != ref_cnt) bad++;
    end
    check(bad == 0, $sformatf("moving count mismatches: %0d", bad));
    check(rate > 0, "count nonzero at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
