// nav_controller: spiking astrocyte-neural network steering a robot towards
// a coloured target while avoiding obstacles.
//
// Input layer: six neurons, one per sensor bit (target / obstacle seen ahead,
// right, left).  A bit at logic 0 makes its neuron fire RATE_LOW (54) spikes
// per window, logic 1 RATE_HIGH (64).
// Hidden layer: ten pattern detectors, each a learning sann_unit with two
// inputs (the target and obstacle neurons of one side, 8 delayed synapses
// each) and an astrocyte centred on one (target, obstacle) pattern:
//     F1 (0,0)  F2 (1,0)  F3 (1,1)   on the forward pair
//     R1 (0,0)  R2 (1,0)  R3 (1,1)   on the right pair
//     L1 (0,0)  L2 (1,0)  L3 (1,1)   on the left pair
//     B1 (0,1)                        on the left pair
// A detector learns to fire at F_TARGET when its pattern is present and
// stays silent otherwise.
// Output layer: four motor neurons (LIF) F, R, L, B; F sums F1..F3, R sums
// R1..R3, L sums L1..L3 and B takes B1, each hidden spike injecting a fixed
// current MOTOR_I large enough to fire the motor neuron on its own.
// Priority Forward > Right > Left > Reverse: an F spike disables the R, L
// and B detectors, an R spike the L and B detectors, for HOLD cycles after
// the spike (enable signals E).  The outcome reproduces the decision table
// of the application: forward unless the only thing ahead is a plain
// obstacle, then right under the same rule, then left, else reverse.
// Timing: a sensor change reaches the astrocytes through the one-window
// rate meters, so the motor outputs settle about 2^10 cycles later (more
// while a detector is still learning).
// From the document: the three layers, 6/10/4 neuron counts, the pattern
// labels, the 54/64 input coding, 8 synapses per connection, one astrocyte
// per hidden neuron and the enable-based priority.  This design's choices:
// gating the hidden spikes (not the currents) with E, the HOLD time, the
// motor-neuron current and the staggering of the input trains.
module nav_controller
  import sann_pkg::*;
#(
  parameter int unsigned F_TARGET = 54,
  parameter weight_t     W_INIT   = 32'sd1200000,
  parameter int unsigned HOLD     = 64,       // enable hold after a motor spike
  parameter int          MOTOR_I  = 200000,   // pA per hidden spike
  parameter int unsigned N_SYN    = NAV_IN * NAV_PATHS
) (
  input  logic        clk,
  input  logic        rst,
  input  nav_sensor_t sensors,
  input  logic        fault [NAV_HIDDEN][N_SYN],  // broken hidden-layer pathways
  input  logic        learn_en,
  output motor_t      motor,                      // motor neuron spikes
  output logic [NAV_HIDDEN-1:0] hidden_spike,     // after the enable gates
  output rate_t       hidden_rate [NAV_HIDDEN]
);
  // input pair used by each detector: 0 forward, 1 right, 2 left
  localparam int unsigned PAIR [NAV_HIDDEN] = '{0, 0, 0, 1, 1, 1, 2, 2, 2, 2};
  // detector pattern (target bit, obstacle bit)
  localparam logic [1:0]  PATT [NAV_HIDDEN] =
    '{2'b00, 2'b10, 2'b11, 2'b00, 2'b10, 2'b11, 2'b00, 2'b10, 2'b11, 2'b01};

  function automatic rate_t code(input logic b);
    return b ? rate_t'(RATE_HIGH) : rate_t'(RATE_LOW);
  endfunction

  // ---------------- input layer ----------------
  logic  bits   [3][2];
  logic  in_spk [3][2];

  assign bits[0] = '{sensors.fc, sensors.fo};
  assign bits[1] = '{sensors.rc, sensors.ro};
  assign bits[2] = '{sensors.lc, sensors.lo};

  for (genvar g = 0; g < 3; g++) begin : g_side
    for (genvar k = 0; k < 2; k++) begin : g_bit
      spike_source #(.PHASE0(g * 331 + k * 517)) u_in (
        .clk(clk), .rst(rst), .rate(code(bits[g][k])), .spike(in_spk[g][k])
      );
    end
  end

  // ---------------- hidden layer ----------------
  logic raw_spike [NAV_HIDDEN];
  logic en_r, en_lb;           // enables from the F and R motor neurons

  for (genvar h = 0; h < NAV_HIDDEN; h++) begin : g_hid
    rate_t   centre [NAV_IN];
    logic    pre    [NAV_IN];
    rate_t   pre_rate [NAV_IN];
    weight_t w      [N_SYN];
    logic    dlv    [N_SYN];
    prob_t   pr;
    a0_t     a0;
    vmem_t   v;
    logic    ready;

    assign centre = '{code(PATT[h][1]), code(PATT[h][0])};
    assign pre    = '{in_spk[PAIR[h]][0], in_spk[PAIR[h]][1]};

    sann_unit #(
      .N_IN(NAV_IN), .N_PATHS(NAV_PATHS), .F_TARGET(F_TARGET),
      .W_INIT(W_INIT), .SEED_BASE(16'(16'h3A5 + h * 7919))
    ) u_unit (
      .clk(clk), .rst(rst), .pre_spike(pre), .centre(centre),
      .fault(fault[h]), .learn_en(learn_en),
      .post_spike(raw_spike[h]), .post_rate(hidden_rate[h]),
      .pre_rate(pre_rate), .pr(pr), .a0(a0), .weight(w),
      .delivered(dlv), .post_v(v), .rates_ready(ready)
    );

    if (PAIR[h] == 0)      begin : g_f assign hidden_spike[h] = raw_spike[h]; end
    else if (PAIR[h] == 1) begin : g_r assign hidden_spike[h] = raw_spike[h] & en_r; end
    else                   begin : g_l assign hidden_spike[h] = raw_spike[h] & en_lb; end
  end

  // ---------------- output layer ----------------
  current_t motor_i [4];
  logic     motor_spk [4];
  vmem_t    motor_v [4];

  always_comb begin
    motor_i[0] = current_t'(MOTOR_I) * current_t'($countones(hidden_spike[2:0]));
    motor_i[1] = current_t'(MOTOR_I) * current_t'($countones(hidden_spike[5:3]));
    motor_i[2] = current_t'(MOTOR_I) * current_t'($countones(hidden_spike[8:6]));
    motor_i[3] = hidden_spike[9] ? current_t'(MOTOR_I) : '0;
  end

  for (genvar m = 0; m < 4; m++) begin : g_motor
    lif_neuron u_motor (
      .clk(clk), .rst(rst), .i_total(motor_i[m]),
      .spike(motor_spk[m]), .v(motor_v[m])
    );
  end

  assign motor = '{fwd: motor_spk[0], right: motor_spk[1],
                   left: motor_spk[2], rev: motor_spk[3]};

  // ---------------- priority enables ----------------
  localparam int unsigned HOLD_W = $clog2(HOLD + 1);
  logic [HOLD_W-1:0] f_hold, r_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      f_hold <= '0;
      r_hold <= '0;
    end else begin
      f_hold <= motor_spk[0] ? HOLD_W'(HOLD) : (f_hold != '0 ? f_hold - 1'b1 : f_hold);
      r_hold <= motor_spk[1] ? HOLD_W'(HOLD) : (r_hold != '0 ? r_hold - 1'b1 : r_hold);
    end
  end

  assign en_r  = (f_hold == '0);
  assign en_lb = (f_hold == '0) && (r_hold == '0);
endmodule
