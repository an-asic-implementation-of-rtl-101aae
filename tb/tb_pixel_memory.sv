// tb_pixel_memory: self-checking test of the one-bit image memory.
// Writes a random image pixel by pixel (with random write-enable gaps and
// some pixels written twice), keeping a copy in a testbench array, then
// reads every row through all three row ports and compares; also checks
// that row addresses past the end read as white and that a write becomes
// visible on the next cycle.
module tb_pixel_memory;
  localparam int W = 160;
  localparam int H = 192;
  localparam int AW = $clog2(W);
  localparam int AH = $clog2(H);

  logic clk = 1'b0;
  logic we = 1'b0, wdata = 1'b0;
  logic [AW-1:0] wi = '0;
  logic [AH-1:0] wj = '0;
  logic [AH-1:0] ra0 = '0, ra1 = '0, ra2 = '0;
  logic [W-1:0] rd0, rd1, rd2;
  bit ref_img [H][W];
  int checks = 0, failures = 0;

  pixel_memory #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_row(input int r);
    logic [W-1:0] v;
    v = '0;
    if (r < H) for (int c = 0; c < W; c++) v[c] = ref_img[r][c];
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    // fill every pixel once in raster order
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        we = 1'b1; wi = AW'(c); wj = AH'(r); wdata = 1'($urandom);
        ref_img[r][c] = wdata;
        if ($urandom_range(0, 7) == 0) begin   // a gap cycle
          @(negedge clk);
          we = 1'b0; wdata = ~wdata;
        end
      end
    // overwrite random pixels
    repeat (2000) begin
      @(negedge clk);
      we = 1'b1; wi = AW'($urandom_range(0, W-1)); wj = AH'($urandom_range(0, H-1));
      wdata = 1'($urandom);
      ref_img[wj][wi] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // read all rows, rotating the ports
    for (int r = 0; r < H; r++) begin
      ra0 = AH'(r); ra1 = AH'((r + 1) % H); ra2 = AH'((r + 2) % H);
      #1;
      check(rd0 == ref_row(r), "port 0 row");
      check(rd1 == ref_row((r + 1) % H), "port 1 row");
      check(rd2 == ref_row((r + 2) % H), "port 2 row");
    end
    // out of range rows
    if (H < (1 << AH)) begin
      ra0 = AH'(H); ra1 = '1; #1;
      check(rd0 == '0 && rd1 == '0, "rows past the end read white");
    end
    // write-then-read on the next cycle
    @(negedge clk);
    we = 1'b1; wi = AW'(7); wj = AH'(5); wdata = ~ref_img[5][7];
    ref_img[5][7] = wdata;
    ra2 = AH'(5);
    #1 check(rd2 == (ref_row(5) ^ (W'(1) << 7)), "old value before the edge");
    @(negedge clk);
    we = 1'b0;
    #1 check(rd2 == ref_row(5), "new value after the edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
