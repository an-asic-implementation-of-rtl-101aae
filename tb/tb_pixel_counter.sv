// tb_pixel_counter: self-checking test of the 160 x 192 address counter.
// Enables the counter on random cycles through two full scans, and checks
// after every edge the address against a separately kept (column, row)
// pair, the 'last' flag, the wrap to (0, 0), and that one scan needs
// exactly W*H enabled cycles. A mid-scan reset is also checked.
module tb_pixel_counter;
  localparam int W = 160;
  localparam int H = 192;

  logic clk = 1'b0, rstb = 1'b0, en = 1'b0;
  logic [$clog2(W)-1:0] i;
  logic [$clog2(H)-1:0] j;
  logic last;
  int checks = 0, failures = 0;
  int ei = 0, ej = 0, enabled = 0, wraps = 0, wrap_at[2];

  pixel_counter #(.W(W), .H(H)) dut (.clk, .rstb, .en, .i, .j, .last);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: i=%0d j=%0d exp %0d,%0d last=%0b", what, i, j, ei, ej, last);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rstb = 1'b1;
    @(negedge clk);
    check(i == 0 && j == 0, "reset address");
    while (wraps < 2) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        enabled++;
        ei++;
        if (ei == W) begin ei = 0; ej++; end
        if (ej == H) begin ej = 0; wrap_at[wraps] = enabled; wraps++; end
      end
      check(int'(i) == ei && int'(j) == ej, "address");
      check(last == (ei == W-1 && ej == H-1), "last flag");
      @(negedge clk);
    end
    check(wrap_at[0] == W*H, "first scan length");
    check(wrap_at[1] == 2*W*H, "second scan length");
    // asynchronous reset in the middle of a scan
    en = 1'b1;
    repeat (1000) @(posedge clk);
    #2 rstb = 1'b0;
    #1 check(i == 0 && j == 0, "async reset");
    en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
