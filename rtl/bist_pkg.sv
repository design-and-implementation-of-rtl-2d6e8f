// bist_pkg: shared constants and types of the concurrent ROM BIST.
//
// The default geometry is the one the whole design is built around: a ROM
// with n = 5 address inputs and m = 5 data outputs (32 words), monitored in
// windows of W = 2**w = 8 vectors, so the k = n - w = 2 high-order address
// bits name the window and the w = 3 low-order bits the vector inside it.
// The T/N mode encoding (0 = normal, 1 = test) is also fixed here.
package bist_pkg;

  // ROM address inputs (n)
  localparam int unsigned N_DEF = 5;
  // low-order bits that locate a vector inside a window (w)
  localparam int unsigned W_BITS_DEF = 3;
  // ROM data outputs (m)
  localparam int unsigned M_DEF = 5;

  // Value of the T/N select
  typedef enum logic {
    MODE_NORMAL = 1'b0,
    MODE_TEST   = 1'b1
  } tn_mode_e;

endpackage
