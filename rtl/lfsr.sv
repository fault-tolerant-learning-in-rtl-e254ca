// lfsr: 16-bit maximal-length Galois linear feedback shift register.
//
// Produces the uniformly distributed pseudorandom number "rand" that each
// probabilistic synapse compares with the release probability PR.  The
// register steps once per cycle while `en` is high; it walks through all
// 65535 non-zero values (polynomial x^16 + x^14 + x^13 + x^11 + 1, feedback
// mask 0xB400).  `rnd` is the register itself, a Q0.16 fraction in 1..65535.
// Reset loads SEED; a zero seed, which would lock the register, is replaced
// by 1.  That an LFSR generates rand follows the document; the width,
// polynomial and seeding are this design's choice.
module lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [15:0] rnd
);
  localparam logic [15:0] TAPS = 16'hB400;
  localparam logic [15:0] SEED_NZ = (SEED == 16'd0) ? 16'd1 : SEED;

  logic [15:0] state;

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED_NZ;
    else if (en) state <= state[0] ? ((state >> 1) ^ TAPS) : (state >> 1);
  end

  assign rnd = state;
endmodule
