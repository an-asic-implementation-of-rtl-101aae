// window_gen: the 3x3 pixel window generator of the thinning processor.
//
// For the pixel at column i, row j it forms the window of the centre pixel
// and its eight neighbours P1..P8 (numbering in thin_pkg). It drives the
// row addresses j-1, j, j+1 to both image memories, takes the three rows
// returned by the memory chosen with sel (0 = Memory A, 1 = Memory B) and
// picks columns i-1, i, i+1 out of them. Neighbours that fall outside the
// image (first/last row or column) are read as white (0).
//
// Timing: purely combinational; with asynchronous memory reads a complete
// window is ready in the same cycle as the address (i, j).
// That the window is built from either memory follows the block diagram;
// the row-wise access and white border are this design's choices.
module window_gen #(
  parameter int unsigned W = thin_pkg::IMG_W,
  parameter int unsigned H = thin_pkg::IMG_H
) (
  input  logic [$clog2(W)-1:0] i,
  input  logic [$clog2(H)-1:0] j,
  input  logic                 sel,
  // row addresses to both memories: rows j-1, j, j+1
  output logic [$clog2(H)-1:0] ra_up,
  output logic [$clog2(H)-1:0] ra_mid,
  output logic [$clog2(H)-1:0] ra_dn,
  // rows read from Memory A and Memory B
  input  logic [W-1:0]         a_up, a_mid, a_dn,
  input  logic [W-1:0]         b_up, b_mid, b_dn,
  output thin_pkg::window_t    win
);

  localparam logic [$clog2(H)-1:0] J_MAX = $clog2(H)'(H - 1);

  logic [W-1:0] up, mid, dn;
  logic [W+1:0] up_p, mid_p, dn_p;   // rows padded with a white pixel each side
  logic         has_up, has_dn;

  assign ra_up  = j - 1'b1;
  assign ra_mid = j;
  assign ra_dn  = j + 1'b1;
  assign has_up = (j != '0);
  assign has_dn = (j != J_MAX);

  always_comb begin
    up  = sel ? b_up  : a_up;
    mid = sel ? b_mid : a_mid;
    dn  = sel ? b_dn  : a_dn;
    // padded bit k holds column k-1, so columns i-1, i, i+1 sit at i, i+1, i+2
    up_p  = has_up ? {1'b0, up, 1'b0} : '0;
    mid_p = {1'b0, mid, 1'b0};
    dn_p  = has_dn ? {1'b0, dn, 1'b0} : '0;

    win.c    = mid_p[i + 1];
    win.p[1] = up_p [i + 2];   // NE
    win.p[2] = up_p [i + 1];   // N
    win.p[3] = up_p [i];       // NW
    win.p[4] = mid_p[i];       // W
    win.p[5] = dn_p [i];       // SW
    win.p[6] = dn_p [i + 1];   // S
    win.p[7] = dn_p [i + 2];   // SE
    win.p[8] = mid_p[i + 2];   // E
  end

endmodule
