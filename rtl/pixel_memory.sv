// pixel_memory: one-bit-per-pixel image store (Memory A / Memory B of the
// thinning processor), W columns by H rows.
//
// The array is organised as H words of W bits, one word per image row.
// Writing is one pixel at a time: with we = 1 the bit wdata is stored at
// column wi of row wj on the rising clock edge. Reading is by whole rows:
// three independent asynchronous read ports return the rows addressed by
// ra0, ra1 and ra2 (the window generator uses them for rows j-1, j, j+1).
// An address beyond the last row reads as all white (0).
//
// Timing: writes take effect at the clock edge, reads are combinational,
// so a pixel written in one cycle is visible in the next.
// The memory size follows the block diagram (160 x 192); the row-wide read
// ports and their number are this design's choice, made so that a new
// 3x3 window is available every clock. The contents have no reset.
module pixel_memory #(
  parameter int unsigned W = thin_pkg::IMG_W,
  parameter int unsigned H = thin_pkg::IMG_H
) (
  input  logic                 clk,
  // pixel write port
  input  logic                 we,
  input  logic [$clog2(W)-1:0] wi,
  input  logic [$clog2(H)-1:0] wj,
  input  logic                 wdata,
  // three row read ports
  input  logic [$clog2(H)-1:0] ra0,
  input  logic [$clog2(H)-1:0] ra1,
  input  logic [$clog2(H)-1:0] ra2,
  output logic [W-1:0]         rd0,
  output logic [W-1:0]         rd1,
  output logic [W-1:0]         rd2
);

  logic [W-1:0] mem [H];

  always_ff @(posedge clk) begin
    if (we && (32'(wj) < H) && (32'(wi) < W)) mem[wj][wi] <= wdata;
  end

  always_comb begin
    rd0 = (32'(ra0) < H) ? mem[ra0] : '0;
    rd1 = (32'(ra1) < H) ? mem[ra1] : '0;
    rd2 = (32'(ra2) < H) ? mem[ra2] : '0;
  end

endmodule
