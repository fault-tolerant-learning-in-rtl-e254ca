// a0_gen: BCM modulation of the STDP window height, A0.
//
// Computes A0 = A / (1 + exp(a (f - f0))) - A_MINUS from the postsynaptic
// rate f (spikes per window).  The sigmoid is an 8-segment piecewise-linear
// table over f - f0 in [-32, 32] (sann_pkg::SIG_Y, a = 0.1), clamped to its
// end values outside; each segment evaluation is one multiply, the scaling
// by A a second.  A0 is signed and registered (one cycle of latency): it is
// near +A/2 while the neuron is silent (window open), 0 at the target rate
// F0 and negative above it.
// The formula, a = 0.1, the 8 segments and the 54 spikes/window target follow
// the document.  The values of A and A_MINUS are not given there; this
// design sets A_MINUS = A/2 so that learning stops exactly at f = f0.
module a0_gen
  import sann_pkg::*;
#(
  parameter int unsigned F0      = 54,     // target rate, spikes/window
  parameter int unsigned A       = 16384,  // maximum window height
  parameter int unsigned A_MINUS = 8192    // maximum depression height
) (
  input  logic  clk,
  input  logic  rst,
  input  rate_t f,
  output a0_t   a0
);
  localparam int SEG_W = 2**SIG_SEG_LOG2;
  localparam int X_MAX = SIG_X0 + int'(PWL_SEGS) * SEG_W;

  logic [16:0] sig;

  always_comb begin
    int           x;
    int unsigned  seg, frac;
    logic [16:0]  y0, y1;
    logic [19:0]  step;
    x    = int'(f) - int'(F0);
    seg  = 0;
    frac = 0;
    y0   = '0;
    y1   = '0;
    step = '0;
    if (x < SIG_X0) begin
      sig = SIG_Y[0];
    end else if (x >= X_MAX) begin
      sig = SIG_Y[PWL_SEGS];
    end else begin
      seg  = unsigned'(x - SIG_X0) >> SIG_SEG_LOG2;
      frac = unsigned'(x - SIG_X0) & unsigned'(SEG_W - 1);
      y0   = SIG_Y[seg];
      y1   = SIG_Y[seg+1];
      step = 20'(y0 - y1) * 20'(frac);
      sig  = y0 - 17'(step >> SIG_SEG_LOG2);
    end
  end

  logic [47:0] scaled;
  assign scaled = 48'(A) * 48'(sig);

  always_ff @(posedge clk) begin
    if (rst) a0 <= '0;
    else     a0 <= a0_t'($signed({1'b0, scaled[47:16]}) - $signed({1'b0, 32'(A_MINUS)}));
  end
endmodule
