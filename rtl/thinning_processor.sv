// thinning_processor: hardware Zhang-Suen thinning of a binary fingerprint
// image (160 x 192 pixels by default).
//
// Structure (the block diagram of the processor):
//   pixel_counter  scans the address (i, j) over the whole image
//   Memory A       pixel_memory holding the input image and, after every
//                  iteration, the partly thinned image
//   Memory B       pixel_memory holding the result of sub-iteration 1
//   window_gen     builds the 3x3 window around (i, j) from A or B
//   thin_stage1    first sub-iteration decision  (A -> B)
//   thin_stage2    second sub-iteration decision (B -> A)
//   thin_ctrl      sequences load, the two sub-iterations, the convergence
//                  test and the output scan
//
// Use: after reset, drive one pixel per cycle on image_in with we = 1 in
// raster order (row 0 columns 0..W-1, then row 1, ...); pauses with we = 0
// are allowed. After the last pixel busy rises, the processor thins the
// image with one pixel decision per clock until an iteration erases
// nothing, then presents the skeleton on thin_image for W*H consecutive
// cycles with thin_valid = 1 and its address on pix_i / pix_j. done then
// rises and stays high until the next frame starts loading. we is ignored
// while busy. 1 = black (ridge) pixel.
//
// Timing: W*H cycles per scan; one iteration (steps 1 and 2) is 2*W*H
// cycles = 61,440 cycles at 160 x 192, i.e. 1.54 ms at 40 MHz.
module thinning_processor #(
  parameter int unsigned W = thin_pkg::IMG_W,
  parameter int unsigned H = thin_pkg::IMG_H
) (
  input  logic                 clk,
  input  logic                 rstb,
  input  logic                 image_in,
  input  logic                 we,
  output logic                 thin_image,
  output logic                 thin_valid,
  output logic [$clog2(W)-1:0] pix_i,
  output logic [$clog2(H)-1:0] pix_j,
  output logic                 busy,
  output logic                 done,
  output logic [7:0]           iter_count
);

  import thin_pkg::*;

  logic [$clog2(W)-1:0] i;
  logic [$clog2(H)-1:0] j;
  logic                 cnt_en, cnt_last;
  logic                 a_we, a_from_stage2, b_we, win_sel;
  logic [$clog2(H)-1:0] ra_up, ra_mid, ra_dn;
  logic [W-1:0]         a_up, a_mid, a_dn, b_up, b_mid, b_dn;
  window_t              win;
  logic                 erase1, pix1, erase2, pix2;

  pixel_counter #(.W(W), .H(H)) u_counter (
    .clk, .rstb, .en(cnt_en), .i, .j, .last(cnt_last)
  );

  thin_ctrl u_ctrl (
    .clk, .rstb, .we, .cnt_last, .erase1, .erase2,
    .cnt_en, .a_we, .a_from_stage2, .b_we, .win_sel,
    .out_valid(thin_valid), .busy, .done, .iter_count
  );

  pixel_memory #(.W(W), .H(H)) u_mem_a (
    .clk, .we(a_we), .wi(i), .wj(j),
    .wdata(a_from_stage2 ? pix2 : image_in),
    .ra0(ra_up), .ra1(ra_mid), .ra2(ra_dn),
    .rd0(a_up), .rd1(a_mid), .rd2(a_dn)
  );

  pixel_memory #(.W(W), .H(H)) u_mem_b (
    .clk, .we(b_we), .wi(i), .wj(j), .wdata(pix1),
    .ra0(ra_up), .ra1(ra_mid), .ra2(ra_dn),
    .rd0(b_up), .rd1(b_mid), .rd2(b_dn)
  );

  window_gen #(.W(W), .H(H)) u_window (
    .i, .j, .sel(win_sel),
    .ra_up, .ra_mid, .ra_dn,
    .a_up, .a_mid, .a_dn, .b_up, .b_mid, .b_dn,
    .win
  );

  thin_stage1 u_stage1 (.w(win), .erase(erase1), .pix(pix1));
  thin_stage2 u_stage2 (.w(win), .erase(erase2), .pix(pix2));

  // During the output scan the window comes from Memory A, which holds the
  // converged skeleton; stage 2 erases nothing there, so its output is the
  // skeleton pixel itself.
  assign thin_image = pix2;
  assign pix_i      = i;
  assign pix_j      = j;

endmodule
