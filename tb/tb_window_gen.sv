// tb_window_gen: self-checking test of the 3x3 window generator.
// The testbench plays both image memories (two random images) and answers
// the row addresses the block drives. For every pixel of both images, and
// each memory selection, the nine window bits are compared with the pixels
// at the geometric offsets (NE, N, NW, W, SW, S, SE, E), taking pixels
// outside the image as white. An all-black image checks the border masking.
module tb_window_gen;
  localparam int W = 160;
  localparam int H = 192;
  localparam int AW = $clog2(W);
  localparam int AH = $clog2(H);

  logic [AW-1:0] i = '0;
  logic [AH-1:0] j = '0;
  logic sel = 1'b0;
  logic [AH-1:0] ra_up, ra_mid, ra_dn;
  logic [W-1:0] a_up, a_mid, a_dn, b_up, b_mid, b_dn;
  thin_pkg::window_t win;
  bit img [2][H][W];
  int checks = 0, failures = 0;
  // offsets (dx, dy) of P1..P8; dy < 0 is the row above
  int dx [8] = '{ 1, 0, -1, -1, -1, 0, 1, 1};
  int dy [8] = '{-1, -1, -1, 0, 1, 1, 1, 0};

  window_gen #(.W(W), .H(H)) dut (.*);

  function automatic logic [W-1:0] row_of(input int m, input int r);
    logic [W-1:0] v;
    v = {W{1'b1}};   // rows past the end are garbage to the window: all 1
    if (r < H) for (int c = 0; c < W; c++) v[c] = img[m][r][c];
    return v;
  endfunction

  // play the two memories for the row addresses now on ra_*
  task automatic serve_rows();
    a_up = row_of(0, int'(ra_up)); a_mid = row_of(0, int'(ra_mid)); a_dn = row_of(0, int'(ra_dn));
    b_up = row_of(1, int'(ra_up)); b_mid = row_of(1, int'(ra_mid)); b_dn = row_of(1, int'(ra_dn));
  endtask

  function automatic bit px(input int m, input int c, input int r);
    if (c < 0 || c >= W || r < 0 || r >= H) return 1'b0;
    return img[m][r][c];
  endfunction

  task automatic sweep(input int m);
    logic [8:1] exp_p;
    sel = (m == 1);
    #1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        i = AW'(c); j = AH'(r);
        #1;
        serve_rows();
        #1;
        for (int k = 0; k < 8; k++) exp_p[k+1] = px(m, c + dx[k], r + dy[k]);
        checks++;
        if (win.c !== px(m, c, r) || win.p !== exp_p) begin
          failures++;
          if (failures < 10)
            $display("FAIL m=%0d (%0d,%0d): got c=%0b p=%b exp c=%0b p=%b", m, c, r, win.c, win.p, px(m, c, r), exp_p);
        end
      end
  endtask

  initial begin
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[m][r][c] = 1'($urandom);
    sweep(0);
    sweep(1);
    // all black memory A, all white memory B: border windows
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin img[0][r][c] = 1'b1; img[1][r][c] = 1'b0; end
    sweep(0);
    sweep(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
