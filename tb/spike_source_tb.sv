// spike_source_tb: for several rates counts the spikes in consecutive
// 1024-cycle windows (must equal the rate exactly) and checks the even
// spacing of a 64-per-window train (one spike every 16 cycles).
module spike_source_tb;
  import sann_pkg::*;
  logic  clk = 1'b0, rst = 1'b1;
  rate_t rate;
  logic  spike;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spike_source #(.PHASE0(0)) dut (.clk(clk), .rst(rst), .rate(rate), .spike(spike));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rates [6] = '{0, 1, 54, 64, 500, 1024};
    int n, last, gap_bad;
    rate = '0;
    repeat (2) @(posedge clk);
    foreach (rates[k]) begin
      rst  <= 1'b1;
      rate <= rate_t'(rates[k]);
      @(posedge clk);
      rst  <= 1'b0;
      for (int w = 0; w < 3; w++) begin
        n = 0;
        repeat (1024) begin @(posedge clk); #1; n += int'(spike); end
        check(n == rates[k], $sformatf("rate %0d window %0d: %0d spikes", rates[k], w, n));
      end
    end
    // spacing at 64 spikes per window
    rst <= 1'b1; rate <= rate_t'(64);
    @(posedge clk); rst <= 1'b0;
    last = -1; gap_bad = 0;
    for (int t = 0; t < 2048; t++) begin
      @(posedge clk); #1;
      if (spike) begin
        if (last >= 0 && t - last != 16) gap_bad++;
        last = t;
      end
    end
    check(gap_bad == 0, "64/window train evenly spaced by 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
