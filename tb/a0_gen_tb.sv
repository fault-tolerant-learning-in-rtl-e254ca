// a0_gen_tb: compares A0 with A/(1+exp(0.1 (f-54))) - A/2 in real arithmetic
// for every rate 0..200 (tolerance 1 % of A), and checks A0 = 0 at the
// target, its sign on either side, monotonic decrease and one-cycle latency.
module a0_gen_tb;
  import sann_pkg::*;
  localparam int A = 16384;
  logic  clk = 1'b0, rst = 1'b1;
  rate_t f;
  a0_t   a0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  a0_gen #(.F0(54), .A(A), .A_MINUS(A / 2)) dut (.clk(clk), .rst(rst), .f(f), .a0(a0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ex, err;
    int  bad, nonmono, prev;
    f = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    bad = 0; nonmono = 0; prev = 1 << 30;
    for (int r = 0; r <= 200; r++) begin
      f = rate_t'(r);
      @(posedge clk); #1;
      ex  = real'(A) / (1.0 + $exp(0.1 * (real'(r) - 54.0))) - real'(A / 2);
      err = real'(a0) - ex;
      if (err < 0) err = -err;
      // outside the table the sigmoid is clamped: allow its residual there
      if (err > ((r < 22 || r > 86) ? 700.0 : 164.0)) bad++;
      if (int'(a0) > prev) nonmono++;
      prev = int'(a0);
      if (r == 54) check(a0 == 0, $sformatf("A0 at target = %0d", a0));
      if (r == 0)  check(a0 > 7000, $sformatf("window open when silent, A0 = %0d", a0));
      if (r == 120) check(a0 < -7000, $sformatf("depression above target, A0 = %0d", a0));
    end
    check(bad == 0, $sformatf("A0 off the sigmoid in %0d cases", bad));
    check(nonmono == 0, "A0 decreases with rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
