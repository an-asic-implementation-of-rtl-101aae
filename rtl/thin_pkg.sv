// thin_pkg: types, sizes and Zhang-Suen helper functions shared by the
// thinning processor.
//
// Image: a binary picture of IMG_W columns by IMG_H rows (160 x 192 by
// default), one bit per pixel, 1 = black (ridge), 0 = white (valley).
// Column index i runs 0..IMG_W-1, row index j runs 0..IMG_H-1; i = 0, j = 0
// is the top-left pixel and the scan goes along a row first.
//
// Neighbour numbering (window_t.p[k], k = 1..8) goes counter-clockwise
// around the centre pixel, starting at the north-east corner:
//
//        P3(NW)  P2(N)  P1(NE)
//        P4(W)   P      P8(E)
//        P5(SW)  P6(S)  P7(SE)
//
// With this numbering the erase conditions read exactly as in the method:
// step 1 needs P2*P6*P8 = 0 and P4*P6*P8 = 0, step 2 needs P2*P4*P8 = 0 and
// P2*P4*P6 = 0. The mirror-image numbering (clockwise from the south-west
// corner) would give identical results.
package thin_pkg;

  parameter int unsigned IMG_W = 160;   // columns
  parameter int unsigned IMG_H = 192;   // rows

  // One 3x3 window: the centre pixel and its eight neighbours.
  typedef struct packed {
    logic       c;      // centre pixel P
    logic [8:1] p;      // neighbours P1..P8, numbering above
  } window_t;

  // Phases of the thinning processor.
  typedef enum logic [1:0] {
    ST_LOAD  = 2'd0,   // idle / accepting image pixels into Memory A
    ST_STEP1 = 2'd1,   // sub-iteration 1: Memory A -> stage 1 -> Memory B
    ST_STEP2 = 2'd2,   // sub-iteration 2: Memory B -> stage 2 -> Memory A
    ST_OUT   = 2'd3    // skeleton streamed out of Memory A
  } state_t;

  // N(P): number of black pixels among the eight neighbours.
  function automatic logic [3:0] nbr_count(input logic [8:1] p);
    logic [3:0] n;
    n = '0;
    for (int k = 1; k <= 8; k++) n += {3'b000, p[k]};
    return n;
  endfunction

  // S(P): number of black-to-white (1 -> 0) changes met when walking once
  // round the cyclic sequence P1, P2, ..., P8, P1.
  function automatic logic [3:0] b2w_count(input logic [8:1] p);
    logic [3:0] s;
    s = '0;
    for (int k = 1; k <= 8; k++) begin
      if (p[k] && !p[(k % 8) + 1]) s += 4'd1;
    end
    return s;
  endfunction

  // Conditions 1 and 2, common to both sub-iterations, for a black centre.
  function automatic logic common_cond(input window_t w);
    logic [3:0] n;
    n = nbr_count(w.p);
    return w.c && (n >= 4'd2) && (n <= 4'd6) && (b2w_count(w.p) == 4'd1);
  endfunction

endpackage
