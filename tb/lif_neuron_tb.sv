// lif_neuron_tb: runs the neuron against an integer Euler model of
// tau dv/dt = -v + R I (K = 6400/65536) for a ramp of input currents and
// checks v and the spike train cycle by cycle; checks the 2-cycle refractory
// hold at 0 V, sub-threshold saturation (R I = 14 mV never fires) and the
// inter-spike interval for R I = 20 mV against the analytic
// ln(4) / -ln(1 - 0.09765625) = 13.5 steps (+ refractory).
module lif_neuron_tb;
  import sann_pkg::*;
  logic     clk = 1'b0, rst = 1'b1;
  current_t i_in = '0;
  logic     spike;
  vmem_t    v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lif_neuron dut (.clk(clk), .rst(rst), .i_total(i_in), .spike(spike), .v(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint mv, step_v;
    int     mref, bad, nspk, last, isi_bad, nisi, hold_bad;
    bit     mspk;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // model comparison over random currents
    mv = 0; mref = 0; bad = 0; nspk = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      i_in = current_t'((t / 500) * 1500 + int'($urandom % 3000));
      @(posedge clk); #1;
      if (mref > 0) begin
        mv = 0; mspk = 1'b0; mref--;
      end else begin
        step_v = ((longint'(i_in) - mv) * 6400) >>> 16;
        if (mv + step_v >= 15000) begin mv = 0; mspk = 1'b1; mref = 2; end
        else begin mv = mv + step_v; mspk = 1'b0; end
      end
      if (longint'(v) != mv || spike != mspk) bad++;
      nspk += int'(spike);
    end
    check(bad == 0, $sformatf("%0d cycles differ from the Euler model", bad));
    check(nspk > 100, $sformatf("%0d spikes in the ramp", nspk));
    // refractory: v held at 0 for 2 cycles after a spike, whatever the input
    i_in = current_t'(1000000);
    hold_bad = 0;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); #1;
      if (spike) begin
        @(posedge clk); #1; if (v != 0 || spike) hold_bad++;
        @(posedge clk); #1; if (v != 0 || spike) hold_bad++;
      end
    end
    check(hold_bad == 0, "refractory hold at rest");
    // sub-threshold drive saturates below V_th
    i_in = current_t'(14000);
    nspk = 0;
    repeat (500) begin @(posedge clk); #1; nspk += int'(spike); end
    repeat (500) begin @(posedge clk); #1; nspk += int'(spike); end
    check(nspk <= 1, $sformatf("R I = 14 mV: %0d spikes", nspk));
    // interval at 20 mV
    i_in = current_t'(20000);
    last = -1; isi_bad = 0; nisi = 0;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk); #1;
      if (spike) begin
        if (last >= 0) begin
          nisi++;
          if (t - last < 15 || t - last > 17) isi_bad++;
        end
        last = t;
      end
    end
    check(nisi > 50 && isi_bad == 0, $sformatf("interval at 20 mV: %0d bad of %0d", isi_bad, nisi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
