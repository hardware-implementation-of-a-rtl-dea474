// nbody_pkg: shared constants for the N-body force pipeline.
//
// The pipeline works on IEEE 754 binary64 numbers (1 sign, 11 exponent and 52
// fraction bits). The floating-point units take the field widths as parameters
// so that a narrower format can be built; the constants below are the
// double-precision defaults used throughout. FISR_MAGIC is the 64-bit magic
// number of the fast inverse square root, 0x5FE6EB50C7B537A9.
package nbody_pkg;

  localparam int unsigned FP_EXP_W = 11;
  localparam int unsigned FP_MAN_W = 52;
  localparam int unsigned FP_W     = 1 + FP_EXP_W + FP_MAN_W;

  typedef logic [FP_W-1:0] fp64_t;

  // Fast inverse square root first-guess constant for binary64.
  localparam fp64_t FISR_MAGIC = 64'h5FE6_EB50_C7B5_37A9;

  // Latencies of the three pipeline sections and of the whole pipeline.
  localparam int unsigned R3_STAGES    = 5;
  localparam int unsigned ISQRT_STAGES = 4;
  localparam int unsigned FORCE_STAGES = 1;
  localparam int unsigned PIPE_STAGES  = R3_STAGES + ISQRT_STAGES + FORCE_STAGES;

endpackage
