// Shared sizes and types of the fast-convolution engine.
//
// Samples and kernel weights are unsigned DATA_W-bit numbers (3 bits, as in
// the reference build that used 3x3-bit multipliers). The FCU works on blocks
// of K = 3 consecutive samples of one image row and computes a K-tap FIR
// filter. Widths below are chosen so that no result ever wraps:
//   FCU_W  : width of one FCU output, at most K*(2^DATA_W-1)^2
//   PU_W   : width of one processing-unit output, the sum of K FCU outputs
// The 3-bit sample width and the 3-tap, 3-parallel unit follow the reference
// design; the output widths are this design's choice (the reference prints
// its results as 6-bit numbers, which cannot hold every possible sum).
package cnn_pkg;

  parameter int unsigned DATA_W = 3;
  parameter int unsigned K      = 3;
  parameter int unsigned FCU_W  = 2 * DATA_W + 2;
  parameter int unsigned PU_W   = FCU_W + 2;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [FCU_W-1:0]  fcu_out_t;
  typedef logic [PU_W-1:0]   pu_out_t;

endpackage
