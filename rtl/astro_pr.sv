// astro_pr: astrocyte A*, the release-probability (PR) generator.
//
// For each of N_IN presynaptic inputs the astrocyte sees the measured rate
// f_pre (spikes per window) and its own centre frequency f_s.  It evaluates
// a Gaussian exp(-(f_pre - f_s)^2 / (2 sigma^2)) per input with an 8-segment
// piecewise-linear table (sann_pkg::GAUSS_Y, one multiply per segment
// evaluation) and multiplies the N_IN results, so PR is high only when the
// whole input pattern matches the centres; a single mismatching input pulls
// it down for every synapse.  PR is an unsigned Q0.16 fraction, registered:
// it follows the rates with one cycle of latency.  Outside the table
// (|f_pre - f_s| >= 16) the Gaussian is taken as 0.
// The Gaussian shape, its 8-segment approximation and the pattern
// selectivity follow the document.  The width sigma = 4, the segment width
// and the combination of per-input values by product are this design's
// choices.
module astro_pr
  import sann_pkg::*;
#(
  parameter int unsigned N_IN = 3
) (
  input  logic  clk,
  input  logic  rst,
  input  rate_t f_pre [N_IN],   // measured presynaptic rates
  input  rate_t f_s   [N_IN],   // centre frequencies of the selected pattern
  output prob_t pr              // release probability, Q0.16
);
  localparam int unsigned SEG_W = 2**PR_SEG_LOG2;

  // one piecewise-linear Gaussian evaluation
  function automatic prob_t gauss_pwl(input rate_t f, input rate_t c);
    rate_t                 d;
    int unsigned           seg;
    logic [PROB_W-1:0]     y0, y1;
    logic [PROB_W+PR_SEG_LOG2-1:0] step;
    d   = (f >= c) ? f - c : c - f;
    seg = int'(d) >> PR_SEG_LOG2;
    if (seg >= PWL_SEGS) return '0;
    y0   = GAUSS_Y[seg];
    y1   = GAUSS_Y[seg+1];
    step = (PROB_W+PR_SEG_LOG2)'(y0 - y1) * (PROB_W+PR_SEG_LOG2)'(d & rate_t'(SEG_W-1));
    return y0 - PROB_W'(step >> PR_SEG_LOG2);
  endfunction

  prob_t pr_next;

  // running product, starting from exactly 1.0 (= 2^16)
  always_comb begin
    logic [PROB_W:0]       acc;
    logic [2*PROB_W+1:0]   prod;
    acc = (PROB_W+1)'(1) << PROB_W;
    for (int i = 0; i < N_IN; i++) begin
      prod = (2*PROB_W+2)'(acc) * (2*PROB_W+2)'(gauss_pwl(f_pre[i], f_s[i]));
      acc  = (PROB_W+1)'(prod >> PROB_W);
    end
    pr_next = acc[PROB_W] ? {PROB_W{1'b1}} : acc[PROB_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) pr <= '0;
    else     pr <= pr_next;
  end
endmodule
