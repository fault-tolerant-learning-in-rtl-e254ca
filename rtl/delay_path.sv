// delay_path: one of the parallel variable-delay synaptic pathways.
//
// Delays a spike by DELAY clock cycles (DELAY >= 1) in a shift register; a
// pulse entering on cycle t leaves on cycle t+DELAY.  Setting `fault` models
// a broken pathway (interconnect fracture, stuck-at-0): nothing leaves it.
// The document gives each of the 8 paths between a neuron pair a different
// delay but not the values; this design uses 1..8 cycles (see sann_unit).
module delay_path #(
  parameter int unsigned DELAY = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic spike_in,
  input  logic fault,
  output logic spike_out
);
  logic [DELAY-1:0] sr;

  if (DELAY == 1) begin : g_one
    always_ff @(posedge clk) begin
      if (rst) sr <= '0;
      else     sr <= spike_in;
    end
  end else begin : g_many
    always_ff @(posedge clk) begin
      if (rst) sr <= '0;
      else     sr <= {sr[DELAY-2:0], spike_in};
    end
  end

  assign spike_out = sr[DELAY-1] & ~fault;
endmodule
