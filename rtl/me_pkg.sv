// me_pkg: types and default sizes shared by the MSD-first motion estimator.
//
// A pixel difference Ic - Ir is carried bit plane by bit plane as a radix-2
// signed digit (Avizienis form): a positive rail p and a negative rail n, the
// digit's value being p - n, so it lies in {-1, 0, +1}. The per-pixel "switch"
// state records whether the leading nonzero digit of the difference has been
// seen yet and whether it was negative.
//
// Default sizes are those of the illustrative array processor the design is
// built around: 4x4 blocks of 8-bit pixels matched against 16 candidate
// positions. The 4x4 arrangement of the 16 candidates (displacements -2..+1 in
// each direction) is this design's choice.
package me_pkg;

  localparam int unsigned BLK_N     = 4;  // block is BLK_N x BLK_N pixels
  localparam int unsigned PIX_BITS  = 8;  // luminance word length = digit planes
  localparam int unsigned CAND_W    = 4;  // candidate positions per row
  localparam int unsigned CAND_H    = 4;  // candidate rows

  // One radix-2 signed digit, value = p - n.
  typedef struct packed {
    logic p;
    logic n;
  } sd_t;

  // Switch state of one pixel's |Ic - Ir| conversion.
  typedef struct packed {
    logic set;  // leading nonzero digit already seen
    logic neg;  // that digit was -1: swap the rails of every later digit
  } sw_state_t;

  // Outcome of one digit-level comparison of a candidate against the
  // running minimum of the current digit plane.
  typedef enum logic [1:0] {
    CMP_UNDECIDED = 2'd0,
    CMP_LARGER    = 2'd1,  // candidate can no longer be the best: discard it
    CMP_SMALLER   = 2'd2   // candidate becomes the running minimum
  } cmp_t;

  function automatic int signed sd_value(sd_t d);
    return int'(d.p) - int'(d.n);
  endfunction

endpackage
