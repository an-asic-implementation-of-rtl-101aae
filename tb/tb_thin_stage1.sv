// tb_thin_stage1: exhaustive self-checking test of sub-iteration 1 of the
// Zhang-Suen method. All 512 windows are applied; the expected decision is
// worked out from the geometric neighbours (north, east, south, west and
// the corners) in the textbook form of the method: a black pixel with 2..6
// black neighbours and exactly one white-after-black transition going
// round the ring is removed unless it is protected by the sub-iteration's
// two direction products. Four named examples (an end point, an interior
// point, two and three black-to-white transitions) must be kept.
module tb_thin_stage1;
  thin_pkg::window_t w;
  logic erase, pix;
  int checks = 0, failures = 0;
  int erased = 0;
  localparam int STEP = 1;

  thin_stage1 dut (.w, .erase, .pix);

  // grid g[row][col], row 0 on top, centre at [1][1]
  function automatic bit ref_erase(input bit g [3][3]);
    bit nn, ne, ee, se, ss, sw, ww, nw;
    bit ring [8];
    int n, s;
    nn = g[0][1]; ne = g[0][2]; ee = g[1][2]; se = g[2][2];
    ss = g[2][1]; sw = g[2][0]; ww = g[1][0]; nw = g[0][0];
    // clockwise ring from north
    ring = '{nn, ne, ee, se, ss, sw, ww, nw};
    n = 0; s = 0;
    for (int k = 0; k < 8; k++) begin
      n += int'(ring[k]);
      if (ring[k] && !ring[(k + 1) % 8]) s++;
    end
    if (!g[1][1] || n < 2 || n > 6 || s != 1) return 1'b0;
    if (STEP == 1) return !(nn && ee && ss) && !(ee && ss && ww);
    else         return !(nn && ee && ww) && !(nn && ss && ww);
  endfunction

  function automatic thin_pkg::window_t to_win(input bit g [3][3]);
    thin_pkg::window_t v;
    v.c = g[1][1];
    v.p = {g[1][2], g[2][2], g[2][1], g[2][0], g[1][0], g[0][0], g[0][1], g[0][2]}; // P8..P1
    return v;
  endfunction

  task automatic apply(input bit g [3][3], input string tag, input bit expect_keep);
    bit e;
    w = to_win(g);
    #1;
    e = ref_erase(g);
    checks++;
    if (erase !== e || pix !== (g[1][1] && !e) || (expect_keep && erase)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: window %b erase=%0b expected %0b", tag, w, erase, e);
    end
    if (erase) erased++;
  endtask

  initial begin
    bit g [3][3];
    for (int v = 0; v < 512; v++) begin
      for (int k = 0; k < 9; k++) g[k / 3][k % 3] = v[k];
      apply(g, "exhaustive", 1'b0);
    end
    // N = 1 end point (only the east neighbour black): kept
    g = '{'{0,0,0}, '{0,1,1}, '{0,0,0}};
    apply(g, "end point", 1'b1);
    // N = 7 interior point: kept
    g = '{'{1,0,1}, '{1,1,1}, '{1,1,1}};
    apply(g, "interior point", 1'b1);
    // S = 2: kept
    g = '{'{1,1,1}, '{1,1,0}, '{0,1,0}};
    apply(g, "two transitions", 1'b1);
    // S = 3: kept
    g = '{'{0,1,0}, '{1,1,0}, '{0,1,0}};
    apply(g, "three transitions", 1'b1);
    checks++;
    if (erased < 10) begin failures++; $display("FAIL too few erasures: %0d", erased); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
