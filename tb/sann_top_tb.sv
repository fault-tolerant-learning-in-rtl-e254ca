// sann_top_tb: end-to-end run of the whole design at its default size.
// Two threads run side by side:
//  * basic unit: learns the (54, 54, 64) pattern to 54 spikes/window, then
//    has 7 of 8 pathways of each input broken one after another (21 breaks,
//    20 windows apart) and must be back at 54 +- 4 after every break; then
//    learning is frozen, a further break must leave the rate down, and a
//    foreign pattern (64, 54, 64) must be blocked by the astrocyte.
//  * navigation: two rounds over the ten rows of the decision table; only
//    the expected motor neuron may fire, at 45..70 spikes per window.
// Mechanism counters: plasticity window opened, A0 negative, rate drop after
// a fault, recovery, learning frozen, foreign pattern blocked, each motor
// direction, priority suppression.  Any mechanism never seen is a failure.
module sann_top_tb;
  import sann_pkg::*;
  localparam int WIN = 1024;

  logic        clk = 1'b0, rst = 1'b1, learn_en = 1'b1;
  rate_t       in_rate [3], centre [3];
  logic        fault [24];
  logic        post_spike;
  rate_t       post_rate;
  prob_t       pr;
  a0_t         a0;
  weight_t     weight [24];
  nav_sensor_t sensors;
  logic        nav_fault [NAV_HIDDEN][16];
  motor_t      motor;
  rate_t       hidden_rate [NAV_HIDDEN];

  int checks = 0, failures = 0;
  int n_open = 0, n_neg = 0, n_drop = 0, n_recover = 0, n_frozen = 0, n_block = 0;
  int n_dir [4] = '{0, 0, 0, 0};
  int n_suppress = 0;

  always #5 clk = ~clk;

  sann_top dut (
    .clk(clk), .rst(rst), .learn_en(learn_en),
    .in_rate(in_rate), .centre(centre), .fault(fault),
    .post_spike(post_spike), .post_rate(post_rate), .pr(pr), .a0(a0), .weight(weight),
    .sensors(sensors), .nav_fault(nav_fault), .motor(motor), .hidden_rate(hidden_rate)
  );

  always @(posedge clk) if (!rst) begin
    if (a0 > 24'sd6000) n_open++;
    if (a0 < 0)         n_neg++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected_dir(input nav_sensor_t x);
    if (!(x.fo && !x.fc)) return 0;
    if (!(x.ro && !x.rc)) return 1;
    if (!(x.lo && !x.lc)) return 2;
    return 3;
  endfunction

  initial begin
    repeat (1200 * WIN) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_unit();
    int settle, min_rate, s, rate_pre;
    centre  = '{54, 54, 64};
    in_rate = '{54, 54, 64};
    settle = -1;
    for (int k = 0; k < 40; k++) begin
      repeat (WIN) @(posedge clk);
      if (post_rate >= 51 && post_rate <= 57) begin
        if (settle < 0) settle = k + 1;
      end else settle = -1;
    end
    check(settle > 0 && settle <= 30, $sformatf("unit settled after %0d windows, rate %0d", settle, post_rate));
    for (int i = 0; i < 3; i++) begin
      for (int p = 1; p < 8; p++) begin
        s = i * 8 + p;
        @(negedge clk);
        fault[s] = 1'b1;
        min_rate = 1024;
        for (int k = 0; k < 20; k++) begin
          repeat (WIN / 4) begin
            @(posedge clk); #1;
            if (int'(post_rate) < min_rate) min_rate = int'(post_rate);
          end
          repeat (3 * WIN / 4) @(posedge clk);
        end
        #1;
        if (min_rate < 52) n_drop++;
        if (post_rate >= 50 && post_rate <= 58) n_recover++;
      end
    end
    check(n_recover == 21, $sformatf("unit recovered after %0d of 21 breaks", n_recover));
    // learning frozen: the last surviving path of input 0 breaks, no repair
    @(negedge clk);
    learn_en = 1'b0;
    rate_pre = int'(post_rate);
    fault[0] = 1'b1;
    repeat (15 * WIN) @(posedge clk);
    #1;
    if (int'(post_rate) < rate_pre - 5) n_frozen++;
    check(int'(post_rate) < rate_pre - 5, $sformatf("frozen unit stays down: %0d -> %0d", rate_pre, post_rate));
    // foreign pattern
    @(negedge clk);
    in_rate = '{64, 54, 64};
    repeat (3 * WIN) @(posedge clk);
    #1;
    if (pr < 3000 && post_rate <= 2) n_block++;
    check(pr < 3000 && post_rate <= 2, $sformatf("foreign pattern: PR %0d rate %0d", pr, post_rate));
  endtask

  task automatic run_nav();
    int cnt [4];
    int e, ok;
    logic [5:0] b;
    int rows [10][6] = '{
      '{0,0,2,2,2,2}, '{1,0,2,2,2,2}, '{1,1,2,2,2,2},
      '{0,1,0,0,2,2}, '{0,1,1,0,2,2}, '{0,1,1,1,2,2},
      '{0,1,0,1,0,0}, '{0,1,0,1,1,0}, '{0,1,0,1,1,1},
      '{0,1,0,1,0,1}};
    for (int round = 0; round < 2; round++) begin
      for (int r = 0; r < 10; r++) begin
        for (int k = 0; k < 6; k++)
          b[5-k] = (rows[r][k] == 2) ? ((round == 0) ? 1'b0 : 1'($urandom % 2)) : 1'(rows[r][k]);
        @(negedge clk);
        sensors = nav_sensor_t'(b);
        repeat (19 * WIN) @(posedge clk);
        cnt = '{0, 0, 0, 0};
        repeat (WIN) begin
          @(posedge clk); #1;
          cnt[0] += int'(motor.fwd); cnt[1] += int'(motor.right);
          cnt[2] += int'(motor.left); cnt[3] += int'(motor.rev);
        end
        e  = expected_dir(sensors);
        ok = (cnt[e] >= 45 && cnt[e] <= 70);
        for (int d = 0; d < 4; d++) if (d != e && cnt[d] != 0) ok = 0;
        check(ok == 1, $sformatf("nav round %0d row %0d sensors %b: F %0d R %0d L %0d B %0d, expected %0d",
                                 round, r, b, cnt[0], cnt[1], cnt[2], cnt[3], e));
        if (ok) n_dir[e]++;
        if (e == 0 && (hidden_rate[3] + hidden_rate[6]) > 20 && cnt[1] == 0 && cnt[2] == 0)
          n_suppress++;
      end
    end
  endtask

  initial begin
    foreach (fault[k]) fault[k] = 1'b0;
    foreach (nav_fault[h, k]) nav_fault[h][k] = 1'b0;
    in_rate = '{54, 54, 64};
    centre  = '{54, 54, 64};
    sensors = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    fork
      run_unit();
      run_nav();
    join
    $display("mechanisms: open=%0d negA0=%0d drop=%0d recover=%0d frozen=%0d block=%0d",
             n_open, n_neg, n_drop, n_recover, n_frozen, n_block);
    $display("directions F %0d R %0d L %0d B %0d, suppressions %0d",
             n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_suppress);
    check(n_open > 0, "plasticity window opened");
    check(n_neg > 0, "A0 went negative");
    check(n_drop > 0, "a fault lowered the rate");
    check(n_frozen > 0, "frozen learning left a fault unrepaired");
    check(n_block > 0, "foreign pattern blocked");
    for (int d = 0; d < 4; d++) check(n_dir[d] > 0, $sformatf("direction %0d chosen", d));
    check(n_suppress > 0, "priority enable suppressed a lower direction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
