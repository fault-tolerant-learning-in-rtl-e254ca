// sann_pkg: shared constants, number formats and piecewise-linear tables
// of the spiking astrocyte-neural network (SANN).
//
// Time base: one clock cycle is one Euler step of 2^-10 s of model time.
// Firing rates are spike counts in a window of 2^10 cycles ("spikes per
// window").  Probabilities (PR, rand) are unsigned Q0.16 fractions.
// Membrane potential is in microvolts, synaptic current in picoamperes, so
// that R_mem = 1 MOhm maps current to potential with a factor of one.
//
// The two tables below hold the breakpoints of the 8-segment piecewise-linear
// approximations used in hardware:
//   GAUSS_Y[i] = round(65535 * exp(-(i*PR_SEG_W)^2 / (2*sigma^2))), sigma = 4,
//                segment width PR_SEG_W = 2 spikes/window, i = 0..8
//   SIG_Y[i]   = round(65536 / (1 + exp(a * x_i))), a = 0.1,
//                x_i = -32 + 8*i spikes/window, i = 0..8
// The document fixes the number of segments (8), a = 0.1 and the functional
// forms; sigma, the segment widths and the covered ranges are this design's
// choice.
package sann_pkg;

  // model time and window
  localparam int unsigned WIN_LOG2   = 10;          // 2^10-cycle rate window
  localparam int unsigned RATE_W     = WIN_LOG2 + 1; // 0 .. 1024 spikes/window

  // number formats
  localparam int unsigned PROB_W     = 16;          // Q0.16 probability / rand
  localparam int unsigned WEIGHT_W   = 32;          // signed synaptic weight
  localparam int unsigned A0_W       = 24;          // signed window height
  localparam int unsigned CUR_W      = 32;          // signed current, pA
  localparam int unsigned VMEM_W     = 32;          // signed potential, uV

  typedef logic [RATE_W-1:0]          rate_t;
  typedef logic [PROB_W-1:0]          prob_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [A0_W-1:0]     a0_t;
  typedef logic signed [CUR_W-1:0]    current_t;
  typedef logic signed [VMEM_W-1:0]   vmem_t;

  // piecewise-linear approximations: 8 segments, 9 breakpoints
  localparam int unsigned PWL_SEGS   = 8;

  // astrocyte release probability, Gaussian of |f_pre - f_s|
  localparam int unsigned PR_SEG_LOG2 = 1;          // segment width 2
  localparam logic [PROB_W-1:0] GAUSS_Y [PWL_SEGS+1] = '{
    16'd65535, 16'd57834, 16'd39749, 16'd21276, 16'd8869,
    16'd2879,  16'd728,   16'd143,   16'd22
  };

  // BCM sigmoid 1/(1+exp(a(f-f0))) in Q0.16, over f-f0 in [-32, 32]
  localparam int SIG_X0       = -32;
  localparam int unsigned SIG_SEG_LOG2 = 3;         // segment width 8
  localparam logic [16:0] SIG_Y [PWL_SEGS+1] = '{
    17'd62969, 17'd60085, 17'd54527, 17'd45218, 17'd32768,
    17'd20318, 17'd11009, 17'd5451,  17'd2567
  };

  // input coding of the navigation network: logic 0 / logic 1 rates
  localparam int unsigned RATE_LOW  = 54;
  localparam int unsigned RATE_HIGH = 64;

  // navigation network (robot application)
  typedef struct packed {
    logic fc;  // coloured target ahead
    logic fo;  // obstacle ahead
    logic rc;  // target to the right
    logic ro;  // obstacle to the right
    logic lc;  // target to the left
    logic lo;  // obstacle to the left
  } nav_sensor_t;

  typedef struct packed {
    logic fwd;
    logic right;
    logic left;
    logic rev;
  } motor_t;

  localparam int unsigned NAV_HIDDEN = 10;  // F1 F2 F3 R1 R2 R3 L1 L2 L3 B1
  localparam int unsigned NAV_IN     = 2;   // (target, obstacle) of one side
  localparam int unsigned NAV_PATHS  = 8;

endpackage
