// asar_pkg: constants and small helpers shared by the Adaptive Stimulation
// Artifact Rejection (ASAR) engine.
//
// The engine cleans one recording channel d_k using a template built from an
// adjacent channel d_k'. The filter length (16 taps) and the training length
// (N = 2^13 samples) are the published values. The fixed-point formats
// (weight, standard-deviation and square-root table fractions), the step
// size mu, the regulariser epsilon and the mapping of the 2-bit threshold
// scale onto alpha are choices of this implementation.
package asar_pkg;

  // Filter length M of the NLMS filter and of the template vector u_i.
  localparam int unsigned NTAPS = 16;

  // log2 of the training length N (N = 2^13 samples).
  localparam int unsigned STATS_LOG2N = 13;

  // Fraction bits of the standard deviation produced by the square root.
  localparam int unsigned STD_FRAC = 4;

  // Fraction bits of the entries of the square-root table.
  localparam int unsigned SQRT_LUT_FRAC = 8;

  // Range of the normalised square-root argument: 256 <= x_n <= 1024.
  localparam int unsigned SQRT_LUT_LO   = 256;
  localparam int unsigned SQRT_LUT_HI   = 1024;
  localparam int unsigned SQRT_LUT_SIZE = SQRT_LUT_HI - SQRT_LUT_LO + 1;

  // Threshold multiplier alpha selected by thresh_scale<1:0>:
  // 00 -> 2, 01 -> 3, 10 -> 4, 11 -> 5.
  function automatic logic [2:0] alpha_of(input logic [1:0] thresh_scale);
    return 3'(thresh_scale) + 3'd2;
  endfunction

  // Engine phase, as seen on train_mode_id / det_enable.
  typedef enum logic [1:0] {
    PH_TRAIN = 2'd0,   // phase I, accumulating statistics
    PH_STORE = 2'd1,   // the one cycle that stores mean / std
    PH_RUN   = 2'd2    // phase II, template detection and filtering
  } asar_phase_e;

endpackage
