// sann_top: the two networks built from the self-repairing SANN unit,
// side by side.
//
// Left half, the basic unit: three layer-1 neurons (spike_source), each
// firing `in_rate[i]` spikes per 2^10-cycle window, feed a sann_unit whose
// astrocyte passes the pattern `centre` (54, 54, 64 in the reference set-up)
// and whose output neuron learns to fire 54 spikes per window.  `fault[s]`
// breaks pathway s (s = 8*i + p: input i, path p); the unit re-learns until
// the output rate is back at target as long as one pathway survives.
// Right half, the navigation network (nav_controller): six sensor bits in,
// four motor-neuron spike outputs with Forward > Right > Left > Reverse
// priority.
// Both halves share clock, reset and the learning enable and are otherwise
// independent.  All outputs are registered in their sub-blocks.
module sann_top
  import sann_pkg::*;
#(
  parameter int unsigned N_IN    = 3,
  parameter int unsigned N_PATHS = 8,
  parameter int unsigned N_SYN   = N_IN * N_PATHS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        learn_en,
  // basic unit
  input  rate_t       in_rate   [N_IN],
  input  rate_t       centre    [N_IN],
  input  logic        fault     [N_SYN],
  output logic        post_spike,
  output rate_t       post_rate,
  output prob_t       pr,
  output a0_t         a0,
  output weight_t     weight    [N_SYN],
  // navigation network
  input  nav_sensor_t sensors,
  input  logic        nav_fault [NAV_HIDDEN][NAV_IN*NAV_PATHS],
  output motor_t      motor,
  output rate_t       hidden_rate [NAV_HIDDEN]
);
  logic  pre_spike [N_IN];
  rate_t pre_rate  [N_IN];
  logic  delivered [N_SYN];
  vmem_t post_v;
  logic  rates_ready;
  logic [NAV_HIDDEN-1:0] hidden_spike;

  for (genvar i = 0; i < N_IN; i++) begin : g_l1
    spike_source #(.PHASE0(i * 347)) u_src (
      .clk(clk), .rst(rst), .rate(in_rate[i]), .spike(pre_spike[i])
    );
  end

  sann_unit #(.N_IN(N_IN), .N_PATHS(N_PATHS)) u_unit (
    .clk(clk), .rst(rst), .pre_spike(pre_spike), .centre(centre),
    .fault(fault), .learn_en(learn_en),
    .post_spike(post_spike), .post_rate(post_rate), .pre_rate(pre_rate),
    .pr(pr), .a0(a0), .weight(weight), .delivered(delivered),
    .post_v(post_v), .rates_ready(rates_ready)
  );

  nav_controller u_nav (
    .clk(clk), .rst(rst), .sensors(sensors), .fault(nav_fault),
    .learn_en(learn_en), .motor(motor), .hidden_spike(hidden_spike),
    .hidden_rate(hidden_rate)
  );
endmodule
