// delay_path_tb: random pulses (an input present in cycle t must appear in
// cycle t+DELAY) through 1-, 5- and 8-cycle paths, compared
// with a software history; a broken path (fault = 1) must deliver nothing.
module delay_path_tb;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0, fault = 1'b0;
  logic d1, d5, d8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_path #(.DELAY(1)) u1 (.clk(clk), .rst(rst), .spike_in(din), .fault(fault), .spike_out(d1));
  delay_path #(.DELAY(5)) u5 (.clk(clk), .rst(rst), .spike_in(din), .fault(fault), .spike_out(d5));
  delay_path #(.DELAY(8)) u8 (.clk(clk), .rst(rst), .spike_in(din), .fault(fault), .spike_out(d8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h [0:2999];
    int bad, ones, leak;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    bad = 0; ones = 0; leak = 0;
    for (int t = 0; t < 3000; t++) begin
      din   <= ($urandom % 4) == 0;
      fault <= (t >= 2000);
      @(posedge clk); #1;
      h[t] = din;
      if (t >= 2000) begin
        if (d1 | d5 | d8) leak++;
      end else begin
        if (d1 != h[t]) bad++;
        if (d5 != ((t >= 4) ? h[t-4] : 1'b0)) bad++;
        if (d8 != ((t >= 7) ? h[t-7] : 1'b0)) bad++;
        ones += int'(d8);
      end
    end
    check(bad == 0, $sformatf("delay mismatches: %0d", bad));
    check(ones > 100, "pulses seen at the output");
    check(leak == 0, "broken path delivers nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
