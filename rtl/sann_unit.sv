// sann_unit: basic fault-tolerant spiking astrocyte-neural unit.
//
// N_IN presynaptic (layer-1) spike trains drive one postsynaptic (layer-2)
// LIF neuron.  Every presynaptic neuron reaches it over N_PATHS parallel
// pathways, path p delaying by p+1 cycles, each ending in a probabilistic
// synapse with its own weight.  Synapse index s = i*N_PATHS + p (input i,
// path p); the paths of input 0 are synapses 0..N_PATHS-1, and so on.
//
//   pre_spike[i] -> rate_meter -> f_pre[i] -+
//                                           astro_pr -> PR (shared)
//   pre_spike[i] -> delay_path(p+1) -> stdp_synapse (rand <= PR ?) -> current
//   sum of currents -> lif_neuron -> post_spike -> rate_meter -> a0_gen -> A0
//   A0 and post_spike feed back into every synapse (BCM-STDP learning).
//
// The astrocyte opens transmission only for input rates near the centre
// pattern `centre`; the BCM rule keeps the window open (A0 > 0) while the
// output rate is below F_TARGET, so weights grow, and closes it at the
// target.  When pathways break (fault[s] = 1) the output rate drops, A0
// rises again and the surviving synapses grow until the rate is restored.
// Latency: a presynaptic spike reaches the neuron after its path delay and
// moves the membrane in the next cycle; rates lag one window (2^10 cycles).
// Topology (3 inputs x 8 paths, one astrocyte, 54 spikes/window target)
// follows the document; the delay values are this design's choice.
module sann_unit
  import sann_pkg::*;
#(
  parameter int unsigned N_IN      = 3,
  parameter int unsigned N_PATHS   = 8,
  parameter int unsigned F_TARGET  = 54,
  parameter int unsigned A_MAX     = 16384,
  parameter int unsigned A_DEP     = 8192,
  parameter weight_t     W_INIT    = 32'sd800000,
  parameter logic [15:0] SEED_BASE = 16'h1D2B,
  parameter int unsigned N_SYN     = N_IN * N_PATHS
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     pre_spike [N_IN],   // layer-1 spike trains
  input  rate_t    centre    [N_IN],   // pattern the astrocyte passes
  input  logic     fault     [N_SYN],  // 1 = pathway broken
  input  logic     learn_en,
  output logic     post_spike,         // layer-2 neuron output
  output rate_t    post_rate,          // spikes in the last window
  output rate_t    pre_rate  [N_IN],
  output prob_t    pr,
  output a0_t      a0,
  output weight_t  weight    [N_SYN],
  output logic     delivered [N_SYN],  // spike released at synapse s
  output vmem_t    post_v,             // membrane potential, uV
  output logic     rates_ready         // rate windows initialised
);
  current_t syn_cur [N_SYN];
  logic     path_out [N_SYN];
  current_t i_total;
  logic     post_ready;
  logic     pre_ready [N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    rate_meter u_pre_rate (
      .clk(clk), .rst(rst), .spike(pre_spike[i]),
      .rate(pre_rate[i]), .ready(pre_ready[i])
    );
    for (genvar p = 0; p < N_PATHS; p++) begin : g_path
      localparam int unsigned S = i * N_PATHS + p;
      delay_path #(.DELAY(p + 1)) u_path (
        .clk(clk), .rst(rst), .spike_in(pre_spike[i]),
        .fault(fault[S]), .spike_out(path_out[S])
      );
      stdp_synapse #(
        .SEED  (16'(SEED_BASE + 16'(S * 40503))),
        .W_INIT(W_INIT)
      ) u_syn (
        .clk(clk), .rst(rst), .pre_spike(path_out[S]), .pr(pr),
        .post_spike(post_spike), .a0(a0), .learn_en(learn_en),
        .delivered(delivered[S]), .cur(syn_cur[S]), .weight(weight[S])
      );
    end
  end

  astro_pr #(.N_IN(N_IN)) u_astro (
    .clk(clk), .rst(rst), .f_pre(pre_rate), .f_s(centre), .pr(pr)
  );

  always_comb begin
    rates_ready = post_ready;
    for (int i = 0; i < N_IN; i++) rates_ready = rates_ready & pre_ready[i];
  end

  always_comb begin
    i_total = '0;
    for (int s = 0; s < N_SYN; s++) i_total = i_total + syn_cur[s];
  end

  lif_neuron u_neuron (
    .clk(clk), .rst(rst), .i_total(i_total), .spike(post_spike), .v(post_v)
  );

  rate_meter u_post_rate (
    .clk(clk), .rst(rst), .spike(post_spike), .rate(post_rate), .ready(post_ready)
  );

  a0_gen #(.F0(F_TARGET), .A(A_MAX), .A_MINUS(A_DEP)) u_a0 (
    .clk(clk), .rst(rst), .f(post_rate), .a0(a0)
  );
endmodule
