// thin_stage1: first sub-iteration of the Zhang-Suen parallel thinning
// method, applied to one 3x3 window.
//
// A black centre pixel is erased when all of these hold:
//   1. 2 <= N(P) <= 6       (N = black neighbours, so not an end point and
//                            not an interior point)
//   2. S(P) = 1             (exactly one black-to-white change round P1..P8)
//   3. P2 * P6 * P8 = 0
//   4. P4 * P6 * P8 = 0
// With the numbering of thin_pkg, conditions 3 and 4 remove pixels on the
// south and east borders and the north-west corners of a stroke.
// Outputs: erase (the centre is removed) and pix (the new centre value,
// P and not erase). White centres pass through unchanged.
//
// Timing: combinational; one decision per window per clock.
// The conditions are those of the method; only the neighbour numbering
// convention (thin_pkg) had to be fixed by this design.
module thin_stage1 (
  input  thin_pkg::window_t w,
  output logic              erase,
  output logic              pix
);

  import thin_pkg::*;

  assign erase = common_cond(w)
               && !(w.p[2] && w.p[6] && w.p[8])
               && !(w.p[4] && w.p[6] && w.p[8]);
  assign pix   = w.c && !erase;

endmodule
