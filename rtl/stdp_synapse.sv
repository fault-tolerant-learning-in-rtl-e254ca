// stdp_synapse: probabilistic synapse with BCM-STDP learning.
//
// Transmission: a spike arriving from its delay path is delivered to the
// postsynaptic neuron only when the synapse's own pseudorandom number
// rand <= PR (PR from the astrocyte).  A delivered spike injects, in the
// same cycle, the current I_inj = (w + dw) * eps with eps = 2^-EPS_SHIFT,
// i.e. the weight after this cycle's update, shifted right.
//
// Learning (pair-based STDP whose height A0 is set by the BCM rule):
//   * postsynaptic spike, last delivered presynaptic spike `age` cycles ago
//     (age = 0 if in this same cycle, so dt = -age <= 0):
//       dw += A0 * 2^-(age div TAU)            (potentiation)
//   * delivered presynaptic spike, last postsynaptic spike `age` >= 1
//     cycles ago (dt = +age > 0):
//       dw -= A0 * 2^-(age div TAU)            (depression)
// Pairs further apart than WIN cycles are ignored.  The power of two makes
// the update a shift of A0.  The weight is clamped to [0, W_MAX].  A broken
// pathway delivers no spikes, so its weight is kept, as the document
// reports.  All state is registered; `cur` and `delivered` are combinational
// in the cycle the spike arrives.
// Following the document: the probabilistic release rule, the base-2 STDP
// window with tau = 5 cycles, the current scaling eps = 2^-6.  This
// design's choices: integer (floor) division for dt/tau, the WIN cut-off,
// nearest-spike pairing, using delivered (not merely arrived) spikes for
// learning, the weight format and limits, one LFSR per synapse.
module stdp_synapse
  import sann_pkg::*;
#(
  parameter logic [15:0] SEED      = 16'hACE1,
  parameter int unsigned TAU       = 5,         // cycles
  parameter int unsigned WIN       = 8*TAU - 1, // largest |dt| that learns
  parameter int unsigned EPS_SHIFT = 6,         // eps = 2^-6
  parameter weight_t     W_INIT    = 32'sd800000,
  parameter weight_t     W_MAX     = 32'sd1073741823
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     pre_spike,   // spike leaving the delay path
  input  prob_t    pr,          // release probability, Q0.16
  input  logic     post_spike,  // postsynaptic neuron fired
  input  a0_t      a0,          // STDP window height from the BCM rule
  input  logic     learn_en,
  output logic     delivered,   // spike passed the release test
  output current_t cur,         // injected current, pA
  output weight_t  weight
);
  localparam int unsigned AGE_W   = $clog2(WIN + 2);
  localparam int unsigned AGE_SAT = 2**AGE_W - 1;

  logic [15:0]      rnd;
  logic [AGE_W-1:0] pre_age, post_age;     // ages as of the previous cycle
  logic [AGE_W-1:0] pre_now, post_now;     // ages in this cycle
  logic             pre_seen, post_seen;   // a spike has happened since reset
  logic signed [WEIGHT_W+1:0] dw, w_sum;
  weight_t          w_next;

  lfsr #(.SEED(SEED)) u_rand (.clk(clk), .rst(rst), .en(1'b1), .rnd(rnd));

  assign delivered = pre_spike && (rnd <= pr);

  function automatic logic [AGE_W-1:0] age_inc(input logic [AGE_W-1:0] a);
    return (a == AGE_W'(AGE_SAT)) ? a : a + 1'b1;
  endfunction

  assign pre_now  = delivered  ? '0 : age_inc(pre_age);
  assign post_now = post_spike ? '0 : age_inc(post_age);

  // window shift |dt| div TAU on the narrow age value
  function automatic logic [AGE_W-1:0] win_shift(input logic [AGE_W-1:0] a);
    return a / AGE_W'(TAU);
  endfunction

  always_comb begin
    dw = '0;
    if (learn_en) begin
      if (post_spike && (pre_seen || delivered) && int'(pre_now) <= int'(WIN))
        dw = dw + ((WEIGHT_W+2)'(a0) >>> win_shift(pre_now));
      if (delivered && !post_spike && post_seen && int'(post_now) <= int'(WIN))
        dw = dw - ((WEIGHT_W+2)'(a0) >>> win_shift(post_now));
    end
    w_sum = (WEIGHT_W+2)'(weight) + dw;
    if (w_sum < 0)                          w_next = '0;
    else if (w_sum > (WEIGHT_W+2)'(W_MAX))  w_next = W_MAX;
    else                                    w_next = weight_t'(w_sum);
  end

  assign cur = delivered ? current_t'(w_next >>> EPS_SHIFT) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      weight    <= W_INIT;
      pre_age   <= AGE_W'(AGE_SAT);
      post_age  <= AGE_W'(AGE_SAT);
      pre_seen  <= 1'b0;
      post_seen <= 1'b0;
    end else begin
      weight    <= w_next;
      pre_age   <= pre_now;
      post_age  <= post_now;
      pre_seen  <= pre_seen  | delivered;
      post_seen <= post_seen | post_spike;
    end
  end
endmodule
