// pixel_counter: the 160 x 192 address counter of the thinning processor.
//
// It produces the two-dimensional pixel address (i, j) that selects one
// pixel of the image array. i is the column (0..W-1) and counts fastest,
// j is the row (0..H-1). Each cycle with en = 1 the address steps once;
// after (W-1, H-1) it wraps to (0, 0). 'last' is high while the address is
// (W-1, H-1), so 'en && last' marks the final pixel of a full scan.
//
// Timing: i, j are registered; a scan of the whole array takes W*H enabled
// cycles. Reset (rstb, active low, asynchronous) clears the address.
// The counter and its 160 x 192 size follow the block diagram; the 'last'
// flag and the scan order are this design's choices.
module pixel_counter #(
  parameter int unsigned W = thin_pkg::IMG_W,
  parameter int unsigned H = thin_pkg::IMG_H
) (
  input  logic                 clk,
  input  logic                 rstb,
  input  logic                 en,
  output logic [$clog2(W)-1:0] i,
  output logic [$clog2(H)-1:0] j,
  output logic                 last
);

  localparam logic [$clog2(W)-1:0] I_MAX = $clog2(W)'(W - 1);
  localparam logic [$clog2(H)-1:0] J_MAX = $clog2(H)'(H - 1);

  assign last = (i == I_MAX) && (j == J_MAX);

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) begin
      i <= '0;
      j <= '0;
    end else if (en) begin
      if (i == I_MAX) begin
        i <= '0;
        j <= (j == J_MAX) ? '0 : j + 1'b1;
      end else begin
        i <= i + 1'b1;
      end
    end
  end

endmodule
