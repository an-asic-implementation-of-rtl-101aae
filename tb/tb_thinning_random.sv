// tb_thinning_random: many random frames through the thinning processor at
// a reduced size (24 x 20), each checked pixel by pixel against the
// behavioural Zhang-Suen model of the testbench, together with the
// iteration count and the cycle count of the thinning phase. Frames are
// random overlapping rectangles and discs (thick strokes) with random
// noise, so erasures in both sub-iterations, strokes on the border, long
// and short convergence all occur; loading has random pauses and we is
// toggled while busy.
module tb_thinning_random;
  localparam int W = 24;
  localparam int H = 20;
  localparam int FRAMES = 40;
  localparam int AW = $clog2(W);
  localparam int AH = $clog2(H);

  logic clk = 1'b0, rstb = 1'b0, image_in = 1'b0, we = 1'b0;
  logic thin_image, thin_valid, busy, done;
  logic [AW-1:0] pix_i;
  logic [AH-1:0] pix_j;
  logic [7:0] iter_count;

  thinning_processor #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  bit img [H][W];
  bit ref_img [H][W];
  int checks = 0, failures = 0;
  int ref_iters;
  longint cyc = 0;
  // mechanism counters
  int n_load_pause = 0, n_we_ignored = 0, n_erase1 = 0, n_erase2 = 0;
  int n_multi_iter = 0, n_first_conv = 0, n_border_px = 0, n_done_clear = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (dut.u_ctrl.state == thin_pkg::ST_STEP1 && dut.erase1) n_erase1++;
    if (dut.u_ctrl.state == thin_pkg::ST_STEP2 && dut.erase2) n_erase2++;
    if (busy && we) n_we_ignored++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic bit px(input bit a [H][W], input int c, input int r);
    if (c < 0 || c >= W || r < 0 || r >= H) return 1'b0;
    return a[r][c];
  endfunction

  // Behavioural Zhang-Suen model; returns the number of iterations,
  // counting the last one that removes nothing.
  function automatic int zs_model(ref bit a [H][W]);
    bit nxt [H][W];
    int iters = 0;
    bit changed;
    do begin
      changed = 1'b0;
      for (int step = 1; step <= 2; step++) begin
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++) begin
            bit p2, p3, p4, p5, p6, p7, p8, p9, del;
            bit ring [8];
            int b, t;
            // textbook names: p2 north, then clockwise
            p2 = px(a, c, r-1);   p3 = px(a, c+1, r-1); p4 = px(a, c+1, r);
            p5 = px(a, c+1, r+1); p6 = px(a, c, r+1);   p7 = px(a, c-1, r+1);
            p8 = px(a, c-1, r);   p9 = px(a, c-1, r-1);
            ring = '{p2, p3, p4, p5, p6, p7, p8, p9};
            b = 0; t = 0;
            for (int k = 0; k < 8; k++) begin
              b += int'(ring[k]);
              if (!ring[k] && ring[(k+1) % 8]) t++;   // 0 -> 1 count equals 1 -> 0 count
            end
            del = a[r][c] && b >= 2 && b <= 6 && t == 1;
            if (step == 1) del = del && !(p2 && p4 && p6) && !(p4 && p6 && p8);
            else           del = del && !(p2 && p4 && p8) && !(p2 && p6 && p8);
            nxt[r][c] = a[r][c] && !del;
            if (del) changed = 1'b1;
          end
        a = nxt;
      end
      iters++;
    end while (changed);
    return iters;
  endfunction

  task automatic load_image();
    int r = 0, c = 0;
    while (r < H) begin
      @(negedge clk);
      if ($urandom_range(0, 15) == 0) begin
        we = 1'b0; image_in = 1'($urandom);
        n_load_pause++;
      end else begin
        we = 1'b1; image_in = img[r][c];
        c++;
        if (c == W) begin c = 0; r++; end
      end
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic run_frame(input string name, input int exp_iters);
    longint t_start, t_first;
    int r, c, errs;
    bit was_done;
    was_done = done;
    fork
      load_image();
      begin
        @(posedge clk iff we);
        #1 if (was_done && !done) n_done_clear++;
      end
    join
    check(busy, {name, ": busy after load"});
    t_start = cyc;
    // random we while busy, until output starts
    while (!thin_valid) begin
      @(negedge clk);
      we = 1'($urandom); image_in = 1'($urandom);
    end
    we = 1'b0;
    t_first = cyc;
    check(t_first - t_start == longint'(exp_iters) * 2 * W * H,
          $sformatf("%s: thinning cycles %0d, expected %0d", name, t_first - t_start, exp_iters * 2 * W * H));
    check(int'(iter_count) == exp_iters,
          $sformatf("%s: iterations %0d, expected %0d", name, iter_count, exp_iters));
    errs = 0;
    for (int k = 0; k < W * H; k++) begin
      r = k / W; c = k % W;
      #1;
      if (!thin_valid || int'(pix_i) != c || int'(pix_j) != r || thin_image != ref_img[r][c]) begin
        errs++;
        if (errs < 5) $display("%s: pixel (%0d,%0d) valid=%0b addr=(%0d,%0d) got %0b exp %0b",
                               name, c, r, thin_valid, pix_i, pix_j, thin_image, ref_img[r][c]);
      end
      if (thin_image && (r == 0 || c == 0 || r == H-1 || c == W-1)) n_border_px++;
      @(negedge clk);
    end
    check(errs == 0, $sformatf("%s: %0d wrong output pixels", name, errs));
    #1 check(done && !busy && !thin_valid, {name, ": done after the output scan"});
    if (exp_iters > 1) n_multi_iter++;
    if (exp_iters == 1) n_first_conv++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rstb = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[r][c] = 1'b0;
      repeat ($urandom_range(1, 6)) begin
        int x0, y0, x1, y1, rad;
        x0 = $urandom_range(0, W-1); y0 = $urandom_range(0, H-1);
        if ($urandom_range(0, 1) == 0) begin
          x1 = x0 + $urandom_range(1, 12); y1 = y0 + $urandom_range(1, 9);
          for (int r = y0; r <= y1 && r < H; r++)
            for (int c = x0; c <= x1 && c < W; c++) img[r][c] = 1'b1;
        end else begin
          rad = $urandom_range(2, 7);
          for (int r = 0; r < H; r++)
            for (int c = 0; c < W; c++)
              if ((r-y0)*(r-y0) + (c-x0)*(c-x0) <= rad*rad) img[r][c] = 1'b1;
        end
      end
      repeat ($urandom_range(0, 20)) img[$urandom_range(0, H-1)][$urandom_range(0, W-1)] ^= 1'b1;
      if (f == FRAMES - 1) begin   // one frame that is already thin
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++) img[r][c] = (c == 5);
      end
      ref_img = img;
      ref_iters = zs_model(ref_img);
      run_frame($sformatf("frame %0d", f), ref_iters);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("mechanisms: load pauses %0d, ignored we %0d, step-1 erasures %0d, step-2 erasures %0d,",
             n_load_pause, n_we_ignored, n_erase1, n_erase2);
    $display("            repeated iterations %0d, first-iteration convergence %0d, border skeleton pixels %0d, done cleared %0d",
             n_multi_iter, n_first_conv, n_border_px, n_done_clear);
    check(n_load_pause > 0, "mechanism: load pause");
    check(n_we_ignored > 0, "mechanism: we ignored while busy");
    check(n_erase1 > 0, "mechanism: step-1 erasure");
    check(n_erase2 > 0, "mechanism: step-2 erasure");
    check(n_multi_iter > 0, "mechanism: repeated iteration");
    check(n_first_conv > 0, "mechanism: convergence on the first iteration");
    check(n_border_px > 0, "mechanism: skeleton pixel on the border");
    check(n_done_clear > 0, "mechanism: done cleared by a new frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
