// spike_source: layer-1 neuron delivering a regular spike train.
//
// Emits exactly `rate` spikes in every 2^WIN_LOG2 cycles, evenly spaced, with
// a phase accumulator: each cycle `rate` is added to a WIN_LOG2-bit
// accumulator and a spike is issued on each carry out.  `rate` may change
// at any time; it takes effect in the next cycle.  `spike` is registered.
// The document states that the input layer relays spike trains of 54 or 64
// spikes per 2^10-cycle window; how such a train is produced is this
// design's choice.
module spike_source
  import sann_pkg::*;
#(
  parameter int unsigned PHASE0 = 0   // initial accumulator value (staggers trains)
) (
  input  logic  clk,
  input  logic  rst,
  input  rate_t rate,                 // spikes per window, 0 .. 2^WIN_LOG2
  output logic  spike
);
  logic [WIN_LOG2-1:0] acc;
  logic [WIN_LOG2:0]   sum;

  assign sum = {1'b0, acc} + RATE_W'(rate);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= WIN_LOG2'(PHASE0);
      spike <= 1'b0;
    end else begin
      acc   <= sum[WIN_LOG2-1:0];
      spike <= sum[WIN_LOG2];
    end
  end
endmodule
