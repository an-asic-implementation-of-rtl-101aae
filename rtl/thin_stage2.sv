// thin_stage2: second sub-iteration of the Zhang-Suen parallel thinning
// method, applied to one 3x3 window.
//
// Conditions 1 and 2 are as in the first sub-iteration (2 <= N(P) <= 6 and
// S(P) = 1, for a black centre); conditions 3 and 4 are replaced by
//   3'. P2 * P4 * P8 = 0
//   4'. P2 * P4 * P6 = 0
// which, with the numbering of thin_pkg, remove pixels on the north and
// west borders and the south-east corners of a stroke.
// Outputs: erase (the centre is removed) and pix (the new centre value).
//
// Timing: combinational; one decision per window per clock.
// The conditions are those of the method; only the neighbour numbering
// convention (thin_pkg) had to be fixed by this design.
module thin_stage2 (
  input  thin_pkg::window_t w,
  output logic              erase,
  output logic              pix
);

  import thin_pkg::*;

  assign erase = common_cond(w)
               && !(w.p[2] && w.p[4] && w.p[8])
               && !(w.p[2] && w.p[4] && w.p[6]);
  assign pix   = w.c && !erase;

endmodule
