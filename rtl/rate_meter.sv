// rate_meter: moving-average firing rate over a window of 2^WIN_LOG2 cycles.
//
// Keeps the last 2^WIN_LOG2 spike bits in a circular one-bit-wide memory and a
// running count: each cycle the bit leaving the window is read and the new
// bit written at the same address, and the count changes by
// (spike_in - spike_out).  `rate` is therefore the exact number of spikes in
// the most recent 2^WIN_LOG2 cycles (the current cycle's spike shows one
// cycle later).  Reset clears the count; the memory is cleared by a sweep
// of 2^WIN_LOG2 cycles after reset, during which the count stays 0 and `ready`
// is low.  The 2^10 window and the use of a moving average follow the
// document; the circular-buffer form is this design's choice (the document's
// resource table lists block RAM for this unit).
module rate_meter
  import sann_pkg::*;
#(
  parameter int unsigned WLOG2 = WIN_LOG2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             spike,
  output logic [WLOG2:0]   rate,
  output logic             ready
);
  logic              hist [2**WLOG2];
  logic [WLOG2-1:0]  ptr;
  logic              clearing;
  logic              old_bit;

  assign old_bit = hist[ptr];
  assign ready   = !clearing;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr      <= '0;
      clearing <= 1'b1;
    end else begin
      ptr <= ptr + 1'b1;
      if (clearing && ptr == {WLOG2{1'b1}}) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) hist[ptr] <= clearing ? 1'b0 : spike;
  end

  always_ff @(posedge clk) begin
    if (rst || clearing) rate <= '0;
    else                 rate <= rate + (WLOG2+1)'(spike) - (WLOG2+1)'(old_bit);
  end
endmodule
