// lfsr_tb: checks the 16-bit LFSR against a bit-serial model of the
// polynomial x^16 + x^14 + x^13 + x^11 + 1, its full 65535-state period,
// that it never reaches zero, the hold on en = 0 and the zero-seed guard.
module lfsr_tb;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [15:0] rnd, rnd0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr #(.SEED(16'hACE1)) dut  (.clk(clk), .rst(rst), .en(en), .rnd(rnd));
  lfsr #(.SEED(16'h0000)) dut0 (.clk(clk), .rst(rst), .en(en), .rnd(rnd0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model: Galois right shift, feedback into bits 15, 13, 12, 10
  function automatic logic [15:0] model_step(input logic [15:0] s);
    logic fb;
    logic [15:0] n;
    fb = s[0];
    n  = s >> 1;
    if (fb) begin
      n[15] = ~n[15]; n[13] = ~n[13]; n[12] = ~n[12]; n[10] = ~n[10];
    end
    return n;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m, first;
    int period, mism;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check(rnd == 16'hACE1, "reset loads SEED");
    check(rnd0 == 16'h0001, "zero seed replaced by 1");
    repeat (5) @(posedge clk); #1;
    check(rnd == 16'hACE1, "holds while en = 0");
    en <= 1'b1;
    m = rnd; first = rnd; period = 0; mism = 0;
    do begin
      @(posedge clk); #1;
      m = model_step(m);
      period++;
      if (rnd != m) mism++;
      if (rnd == 16'h0000) mism++;
    end while (rnd != first && period < 70000);
    check(mism == 0, "sequence matches model and avoids zero");
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
