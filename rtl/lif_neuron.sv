// lif_neuron: leaky integrate-and-fire neuron, forward-Euler integrated.
//
// Each cycle is one Euler step of dt = 2^-10 s of tau_mem dv/dt =
// -v + R_mem * sum(I_syn):
//     v <- v + (R_mem * I_total - v) * K / 2^16,   K = 2^16 * dt / tau_mem
// With tau_mem = 10 ms, K = 6400 exactly.  v is in microvolts and I_total in
// picoamperes, so R_mem = 1 MOhm is a factor of 1 (parameter R_MEM, MOhm).
// When v reaches V_TH (15 mV = 15000 uV) the neuron emits `spike` for one
// cycle, v is set to the resting value 0 and held there for REFRACT cycles
// (2), during which input is ignored.  `spike` is registered: it is high in
// the cycle after the one whose input crossed the threshold.
// The equation, the constants (1 MOhm, 15 mV, 10 ms, 0 V, 2^-10 s, 2-cycle
// refractory period) and Euler integration follow the document; the
// fixed-point units, the truncation of the step and the >= comparison are
// this design's choices.
module lif_neuron
  import sann_pkg::*;
#(
  parameter int unsigned R_MEM   = 1,      // MOhm
  parameter int          V_TH    = 15000,  // uV
  parameter int unsigned K_STEP  = 6400,   // 2^16 * dt / tau_mem
  parameter int unsigned REFRACT = 2       // cycles held at rest after a spike
) (
  input  logic     clk,
  input  logic     rst,
  input  current_t i_total,  // summed synaptic current, pA
  output logic     spike,
  output vmem_t    v
);
  localparam int unsigned REF_W = (REFRACT < 2) ? 1 : $clog2(REFRACT + 1);

  logic [REF_W-1:0]  ref_cnt;
  logic signed [63:0] drive, delta, v_new;

  always_comb begin
    drive = 64'(i_total) * $signed(64'(R_MEM));
    delta = ((drive - 64'(v)) * $signed(64'(K_STEP))) >>> 16;
    v_new = 64'(v) + delta;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v       <= '0;
      spike   <= 1'b0;
      ref_cnt <= '0;
    end else if (ref_cnt != '0) begin
      v       <= '0;
      spike   <= 1'b0;
      ref_cnt <= ref_cnt - 1'b1;
    end else if (v_new >= 64'(V_TH)) begin
      v       <= '0;
      spike   <= 1'b1;
      ref_cnt <= REF_W'(REFRACT);
    end else begin
      v       <= vmem_t'(v_new);
      spike   <= 1'b0;
    end
  end
endmodule
