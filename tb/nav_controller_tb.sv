// nav_controller_tb: drives the navigation network through the ten rows of
// its decision table (don't-care bits random in the second round) and checks
// that, in the last window of each 20-window hold, only the expected motor
// neuron fires, at 45..70 spikes per window.  The expected direction comes
// from the priority rule: forward unless the only thing ahead is a plain
// obstacle (Fc,Fo = 0,1), then right by the same rule, then left, else
// reverse.  It then breaks, one every 10 windows, 3 of the 8 pathways of
// each input of the F1 detector and checks that the forward output
// recovers.  Counts the
// priority suppressions (a lower detector firing while its motor neuron is
// held silent) and each direction chosen; a mechanism never seen fails.
module nav_controller_tb;
  import sann_pkg::*;
  localparam int WIN = 1024;
  localparam int HOLD_WINS = 20;

  logic        clk = 1'b0, rst = 1'b1;
  nav_sensor_t s;
  logic        fault [NAV_HIDDEN][16];
  motor_t      m;
  logic [NAV_HIDDEN-1:0] hs;
  rate_t       hr [NAV_HIDDEN];
  int checks = 0, failures = 0;
  int n_dir [4] = '{0, 0, 0, 0};
  int n_suppress = 0;

  always #5 clk = ~clk;

  nav_controller dut (
    .clk(clk), .rst(rst), .sensors(s), .fault(fault), .learn_en(1'b1),
    .motor(m), .hidden_spike(hs), .hidden_rate(hr)
  );

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

  // rows of the decision table: {fc fo rc ro lc lo}, 2 = don't care
  int rows [10][6] = '{
    '{0,0,2,2,2,2}, '{1,0,2,2,2,2}, '{1,1,2,2,2,2},
    '{0,1,0,0,2,2}, '{0,1,1,0,2,2}, '{0,1,1,1,2,2},
    '{0,1,0,1,0,0}, '{0,1,0,1,1,0}, '{0,1,0,1,1,1},
    '{0,1,0,1,0,1}};

  task automatic measure(output int cnt [4]);
    cnt = '{0, 0, 0, 0};
    repeat (WIN) begin
      @(posedge clk); #1;
      cnt[0] += int'(m.fwd); cnt[1] += int'(m.right);
      cnt[2] += int'(m.left); cnt[3] += int'(m.rev);
    end
  endtask

  initial begin
    repeat (600 * WIN) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [4];
    int e, ok;
    logic [5:0] b;
    foreach (fault[h, k]) fault[h][k] = 1'b0;
    s = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int round = 0; round < 2; round++) begin
      for (int r = 0; r < 10; r++) begin
        for (int k = 0; k < 6; k++)
          b[5-k] = (rows[r][k] == 2) ? ((round == 0) ? 1'b0 : 1'($urandom % 2)) : 1'(rows[r][k]);
        @(negedge clk);
        s = nav_sensor_t'(b);
        repeat ((HOLD_WINS - 1) * WIN) @(posedge clk);
        measure(cnt);
        e = expected_dir(s);
        ok = (cnt[e] >= 45 && cnt[e] <= 70);
        for (int d = 0; d < 4; d++) if (d != e && cnt[d] != 0) ok = 0;
        check(ok == 1, $sformatf("round %0d row %0d sensors %b: F %0d R %0d L %0d B %0d, expected %0d",
                                 round, r, b, cnt[0], cnt[1], cnt[2], cnt[3], e));
        if (ok) n_dir[e]++;
        // a lower-priority detector learned its pattern but is held off
        if (e == 0 && (hr[3] + hr[4] + hr[5] + hr[6] + hr[7] + hr[8] + hr[9]) > 20 &&
            cnt[1] == 0 && cnt[2] == 0 && cnt[3] == 0) n_suppress++;
      end
    end
    // repair: break 3 of 8 pathways of each F1 input under pattern 000000
    @(negedge clk);
    s = '0;
    repeat (HOLD_WINS * WIN) @(posedge clk);
    @(negedge clk);
    for (int k = 1; k < 4; k++) begin
      for (int j = 0; j < 2; j++) begin
        @(negedge clk);
        fault[0][8 * j + k] = 1'b1;
        repeat (10 * WIN) @(posedge clk);
      end
    end
    repeat (20 * WIN) @(posedge clk);
    measure(cnt);
    check(cnt[0] >= 45 && cnt[0] <= 70 && cnt[1] == 0 && cnt[2] == 0 && cnt[3] == 0,
          $sformatf("forward after 6 broken pathways: F %0d R %0d L %0d B %0d", cnt[0], cnt[1], cnt[2], cnt[3]));
    $display("directions F %0d R %0d L %0d B %0d, suppressions %0d",
             n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_suppress);
    for (int d = 0; d < 4; d++) check(n_dir[d] > 0, $sformatf("direction %0d chosen", d));
    check(n_suppress > 0, "priority enable suppressed a lower direction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
