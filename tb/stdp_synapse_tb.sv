// stdp_synapse_tb: directed pre/post spike pairs with known spacing check
// the weight change A0 * 2^-(|dt| div 5) for potentiation (pre first or
// together) and depression (post first), the WIN cut-off, the learning
// enable, negative A0, clamping at zero and the injected current
// (w + dw) / 64.  Random release at PR = 0, 1/2 and 1 checks the release
// statistics.
module stdp_synapse_tb;
  import sann_pkg::*;
  localparam weight_t W0 = 32'sd800000;
  logic     clk = 1'b0, rst = 1'b1;
  logic     pre = 1'b0, post = 1'b0, learn = 1'b1;
  prob_t    pr = '1;
  a0_t      a0 = '0;
  logic     delivered;
  current_t cur;
  weight_t  w;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stdp_synapse #(.W_INIT(W0)) dut (
    .clk(clk), .rst(rst), .pre_spike(pre), .pr(pr), .post_spike(post),
    .a0(a0), .learn_en(learn), .delivered(delivered), .cur(cur), .weight(w)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one clock with the given spikes; inputs change after the falling edge
  task automatic step(input logic p, input logic q);
    @(negedge clk);
    pre = p; post = q;
    @(posedge clk); #1;
    pre = 1'b0; post = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) step(1'b0, 1'b0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    weight_t wref;
    int n_dl;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    a0 = 24'sd1000;
    check(w == W0, "reset weight");
    // potentiation: pre, then post 7 cycles later -> +1000 >> 1
    step(1, 0); idle(6); step(0, 1);
    wref = W0 + 500;
    check(w == wref, $sformatf("LTP dt=-7: w=%0d expected %0d", w, wref));
    // depression: post, then pre 12 cycles later -> -(1000 >> 2)
    step(0, 1);                      // second post: pre age 8 -> +500
    wref += 500;
    check(w == wref, $sformatf("LTP dt=-8: w=%0d expected %0d", w, wref));
    idle(11); step(1, 0);
    wref -= 250;
    check(w == wref, $sformatf("LTD dt=+12: w=%0d expected %0d", w, wref));
    // simultaneous pre and post: dt = 0 -> +A0; current uses the new weight
    idle(60);
    @(negedge clk); pre = 1'b1; post = 1'b1; #1;
    check(delivered, "spike delivered at PR = 1");
    check(cur == current_t'((wref + 1000) >>> 6), $sformatf("current %0d", cur));
    @(posedge clk); #1; pre = 1'b0; post = 1'b0;
    wref += 1000;
    check(w == wref, $sformatf("dt=0: w=%0d expected %0d", w, wref));
    // pairs beyond the window do nothing
    idle(60); step(0, 1); idle(50); step(1, 0);
    check(w == wref, "no change beyond the window");
    @(negedge clk); #1;
    check(cur == 0, "no current without a spike");
    // learning disabled
    learn = 1'b0;
    step(1, 0); idle(2); step(0, 1); idle(2); step(1, 0);
    check(w == wref, "frozen when learn_en = 0");
    learn = 1'b1;
    // negative A0 turns potentiation into depression
    idle(60);
    a0 = -24'sd800;
    step(1, 0); idle(1); step(0, 1);          // dt = -2 -> -800
    wref -= 800;
    check(w == wref, $sformatf("negative A0: w=%0d expected %0d", w, wref));
    // clamping at zero
    a0 = -24'sd4000000;
    step(1, 1); step(1, 1);
    check(w == 0, $sformatf("clamped at 0, w=%0d", w));
    a0 = '0;
    // release statistics
    pr = '0; n_dl = 0;
    repeat (300) begin
      @(negedge clk); pre = 1'b1; #1; n_dl += int'(delivered); @(posedge clk);
    end
    check(n_dl == 0, "PR = 0 never releases");
    pr = 16'd32768; n_dl = 0;
    repeat (4000) begin
      @(negedge clk); pre = 1'b1; #1; n_dl += int'(delivered); @(posedge clk);
    end
    check(n_dl > 1800 && n_dl < 2200, $sformatf("PR = 1/2 releases %0d of 4000", n_dl));
    pre = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
