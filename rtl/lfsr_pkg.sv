// Shared constants of the three-parallel LFSR for g(x) = 1 + x + x^8 + x^9.
//
// The serial LFSR obeys  y(n) = y(n-1) ^ y(n-8) ^ y(n-9) ^ u(n-1) ^ u(n-8) ^ u(n-9).
// Applying that recursion to itself three times (look-ahead) gives the form the
// parallel architecture computes, in which every feedback term is at least three
// bits (one block) old:
//   y(n) = y(n-3) ^ y(n-8) ^ y(n-11) ^ v(n)
//   v(n) = u(n-1) ^ u(n-2) ^ u(n-3) ^ u(n-8) ^ u(n-11)
// The polynomial and the three-way parallelism follow the source design; the
// look-ahead equation is derived from them.
package lfsr_pkg;

  // Bits processed per clock (L-parallel, L = 3).
  localparam int unsigned LANES = 3;

  // Input blocks of history needed by v(n): u(n-11) reaches 4 blocks back.
  localparam int unsigned U_HIST_BLOCKS = 4;

  // Delays d of the feed-forward terms u(n-d) of the look-ahead equation.
  localparam int unsigned N_UTAPS = 5;
  localparam int unsigned UTAPS[N_UTAPS] = '{1, 2, 3, 8, 11};

  // Flip-flops in one lfsr3_retimed: input history, cutset register,
  // output register, one-block feedback delay, and the second feedback
  // delay, which only lanes 1 and 2 need.
  localparam int unsigned N_FF = LANES * (U_HIST_BLOCKS + 3) + (LANES - 1);

  typedef logic [LANES-1:0] lane_t;

endpackage
