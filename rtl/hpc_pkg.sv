// hpc_pkg: shared constants of the 2-D Hamming product code (2-D HPC).
//
// The window is an N x N bit array. Every row and every column is protected
// by the same Hamming-style code with R check bits per line. The code is
// given by a parity matrix of N columns of R bits each, stored flat as an
// N*R-bit vector: column j (the pattern of data position j) occupies bits
// [j*R +: R]. A line's check bits are the XOR of the columns whose data bit
// is 1, and a non-zero syndrome that equals column j points at position j.
//
// All vectors use ascending ranges ([0:N-1], [0:R-1]) so that a bit string
// written left to right reads position 0 first, the way the window, the
// received bit stream and the parity matrix are printed by the simulation.
//
// The defaults (a 7 x 7 window, 4 check bits per line and the parity matrix
// 1001 1010 1011 1000 0100 0010 0001) are the values of the reference
// 7 x 7 simulation. The pass limit of the iterative corrector is a design
// choice.
package hpc_pkg;

  localparam int unsigned HPC_N = 7;  // window side, data bits per line
  localparam int unsigned HPC_R = 4;  // check bits per line

  // Parity matrix of the 7 x 7 window: one 4-bit column per data position.
  localparam logic [0:HPC_N*HPC_R-1] HPC_H_DEFAULT =
      28'b1001_1010_1011_1000_0100_0010_0001;

  // Half passes (one row pass or one column pass each) the iterative
  // corrector may spend on one window before giving up.
  localparam int unsigned HPC_MAX_HALF_PASSES = 8;

  // Direction of one half pass of the iterative corrector.
  typedef enum logic {
    DIR_ROW = 1'b0,
    DIR_COL = 1'b1
  } hpc_dir_e;

endpackage
