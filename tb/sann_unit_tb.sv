// sann_unit_tb: the fault-repair experiment on the basic 3-input unit.
//  1. Learning: inputs at (54, 54, 64) spikes/window, the astrocyte's pattern;
//     the output must settle at 54 +- 3 spikes/window within 30 windows.
//  2. Repair: pathways are broken one by one, 7 of input 0, then 7 of
//     input 1, then 7 of input 2 (one survivor each), every WIN_PER_FAULT
//     windows; after each break the rate must be back at 54 +- 4 by the end
//     of the interval, broken synapses must keep their weight (from 64
//     cycles after the break, once the last pairing has passed) and the
//     survivors must have grown.
//  3. Selectivity: after a reset, inputs at (64, 54, 64): PR must stay low,
//     the neuron silent and the weights unchanged.
// Counts how often each mechanism happened (window opened, A0 negative,
// rate drop after a fault, recovery, blocked pattern); one never seen
// counts as a failure.
module sann_unit_tb;
  import sann_pkg::*;
  localparam int WIN = 1024;
  localparam int WIN_PER_FAULT = 20;
  localparam weight_t W0 = 32'sd800000;

  logic    clk = 1'b0, rst = 1'b1;
  rate_t   rate_in [3];
  rate_t   centre [3];
  logic    pre [3];
  logic    fault [24];
  logic    post_spike, ready;
  rate_t   post_rate, pre_rate [3];
  prob_t   pr;
  a0_t     a0;
  weight_t w [24];
  logic    dlv [24];
  vmem_t   v;
  int checks = 0, failures = 0;
  int n_open = 0, n_neg = 0, n_drop = 0, n_recover = 0, n_block = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < 3; i++) begin : g_src
    spike_source #(.PHASE0(i * 347)) u_src (.clk(clk), .rst(rst), .rate(rate_in[i]), .spike(pre[i]));
  end

  sann_unit dut (
    .clk(clk), .rst(rst), .pre_spike(pre), .centre(centre), .fault(fault),
    .learn_en(1'b1), .post_spike(post_spike), .post_rate(post_rate),
    .pre_rate(pre_rate), .pr(pr), .a0(a0), .weight(w), .delivered(dlv),
    .post_v(v), .rates_ready(ready)
  );

  always @(posedge clk) if (!rst) begin
    if (a0 > 24'sd6000) n_open++;
    if (a0 < 0)         n_neg++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000 * WIN) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int settle, min_rate, s, bad_keep, grown;
    weight_t w_at_break [24];
    centre  = '{54, 54, 64};
    rate_in = '{54, 54, 64};
    foreach (fault[k]) fault[k] = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // 1. learning from scratch
    settle = -1;
    for (int k = 0; k < 40; k++) begin
      repeat (WIN) @(posedge clk);
      if (post_rate >= 51 && post_rate <= 57) begin
        if (settle < 0) settle = k + 1;
      end else settle = -1;
    end
    check(settle > 0 && settle <= 30, $sformatf("settled after %0d windows, rate %0d", settle, post_rate));
    check(pr >= 65000, $sformatf("selected pattern passes, PR=%0d", pr));
    check(w[0] != W0 || w[9] != W0 || w[17] != W0, "weights learned");
    // 2. gradual faults
    bad_keep = 0;
    for (int i = 0; i < 3; i++) begin
      for (int p = 1; p < 8; p++) begin
        s = i * 8 + p;
        @(negedge clk);
        fault[s] = 1'b1;
        // a spike delivered just before the break may still pair once
        repeat (64) @(posedge clk);
        #1 w_at_break[s] = w[s];
        min_rate = 1024;
        for (int k = 0; k < WIN_PER_FAULT; k++) begin
          repeat (WIN / 4) begin
            @(posedge clk); #1;
            if (int'(post_rate) < min_rate) min_rate = int'(post_rate);
          end
          repeat (3 * WIN / 4) @(posedge clk);
        end
        #1;
        $display("break of synapse %0d: lowest rate %0d, rate now %0d, survivor weight %0d",
                 s, min_rate, post_rate, w[i * 8]);
        if (min_rate < 52) n_drop++;
        if (post_rate >= 50 && post_rate <= 58) n_recover++;
        else $display("no recovery after break of synapse %0d: rate %0d", s, post_rate);
      end
    end
    check(n_recover == 21, $sformatf("recovered after %0d of 21 breaks", n_recover));
    for (int s2 = 0; s2 < 24; s2++)
      if (s2 % 8 != 0 && w[s2] != w_at_break[s2]) bad_keep++;
    check(bad_keep == 0, $sformatf("%0d broken synapses changed weight", bad_keep));
    grown = 0;
    for (int i = 0; i < 3; i++) if (w[i * 8] > 2 * W0) grown++;
    check(grown == 3, $sformatf("%0d survivors grew past twice the start weight", grown));
    $display("survivor weights %0d %0d %0d, rate %0d", w[0], w[8], w[16], post_rate);
    // 3. a pattern outside the astrocyte's window
    @(negedge clk);
    rst = 1'b1;
    foreach (fault[k]) fault[k] = 1'b0;
    rate_in = '{64, 54, 64};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (12 * WIN) @(posedge clk);
    #1;
    if (pr < 3000 && post_rate <= 2) n_block++;
    check(pr < 3000, $sformatf("foreign pattern PR=%0d", pr));
    check(post_rate <= 2, $sformatf("foreign pattern output rate %0d", post_rate));
    grown = 0;
    foreach (w[k]) if (w[k] != W0) grown++;
    check(grown == 0, $sformatf("%0d weights changed under a foreign pattern", grown));
    // mechanisms
    $display("mechanisms: open=%0d negA0=%0d drop=%0d recover=%0d block=%0d",
             n_open, n_neg, n_drop, n_recover, n_block);
    check(n_open > 0, "plasticity window opened");
    check(n_neg > 0, "A0 went negative (overshoot correction)");
    check(n_drop > 0, "a fault lowered the rate");
    check(n_block > 0, "foreign pattern blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
