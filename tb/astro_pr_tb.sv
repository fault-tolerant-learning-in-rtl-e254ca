// astro_pr_tb: compares the astrocyte's release probability with the exact
// Gaussian product prod_i exp(-(f_i - c_i)^2 / 32) computed in real
// arithmetic (tolerance 6 % of full scale: the piecewise-linear
// approximation is off by up to 2.8 % per input at odd distances), and checks pattern selectivity: the (54,54,64) pattern
// passes, any other pattern built from 54 and 64 is blocked.
module astro_pr_tb;
  import sann_pkg::*;
  logic  clk = 1'b0, rst = 1'b1;
  rate_t f [3], c [3];
  prob_t pr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  astro_pr #(.N_IN(3)) dut (.clk(clk), .rst(rst), .f_pre(f), .f_s(c), .pr(pr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real gauss(input int d);
    return $exp(-(real'(d) * real'(d)) / 32.0);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expect_pr, err, max_err;
    int  bad;
    c = '{54, 54, 64};
    f = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // random sweep near the centres
    bad = 0; max_err = 0.0;
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 3; i++) f[i] = rate_t'(int'(c[i]) - 20 + int'($urandom % 41));
      @(posedge clk); @(posedge clk); #1;
      expect_pr = 65536.0;
      for (int i = 0; i < 3; i++) expect_pr = expect_pr * gauss(int'(f[i]) - int'(c[i]));
      err = real'(pr) - expect_pr;
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      if (err > 4000.0) bad++;
    end
    check(bad == 0, $sformatf("PR off the Gaussian: %0d cases, max error %f", bad, max_err));
    // selectivity over all 8 patterns of 54/64
    for (int p = 0; p < 8; p++) begin
      f[0] = p[2] ? 64 : 54;
      f[1] = p[1] ? 64 : 54;
      f[2] = p[0] ? 64 : 54;
      @(posedge clk); @(posedge clk); #1;
      if (p == 1) check(pr >= 65500, $sformatf("selected pattern passes, PR=%0d", pr));
      else        check(pr <= 3000,  $sformatf("pattern %0d blocked, PR=%0d", p, pr));
    end
    // latency: one register
    f = '{54, 54, 64};
    @(posedge clk); @(posedge clk);
    @(negedge clk);
    f[0] = 80;
    #1;
    check(pr >= 65500, "old PR held until the next edge");
    @(posedge clk); #1;
    check(pr == 0, "far from centre gives PR = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
