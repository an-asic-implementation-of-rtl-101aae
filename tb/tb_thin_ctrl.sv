// tb_thin_ctrl: self-checking test of the thinning sequencer.
// The testbench plays the pixel counter (a scan of L addresses) and the two
// stage blocks. It loads a frame with random pauses, then scripts three
// iterations: the first erases a pixel in step 1 only, the second erases
// only on the very last pixel of step 2, the third erases nothing. It
// expects phases LOAD, (STEP1, STEP2) x 3, OUT, LOAD, each scan exactly L
// cycles long, checks every control output in every cycle against the
// phase it expects, the iteration count, busy/done, and that we is
// ignored while busy. A second frame checks that done clears on loading.
module tb_thin_ctrl;
  import thin_pkg::*;
  localparam int L = 12;   // pixels per scan

  logic clk = 1'b0, rstb = 1'b0;
  logic we = 1'b0, cnt_last, erase1 = 1'b0, erase2 = 1'b0;
  logic cnt_en, a_we, a_from_stage2, b_we, win_sel, out_valid, busy, done;
  logic [7:0] iter_count;
  int pos = 0;
  int checks = 0, failures = 0;

  thin_ctrl dut (.*);
  wire state_t state = dut.state;

  always #5 clk = ~clk;
  assign cnt_last = (pos == L - 1);
  always_ff @(posedge clk) if (!rstb) pos <= 0; else if (cnt_en) pos <= (pos == L - 1) ? 0 : pos + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at pos %0d state %s", what, pos, state.name());
    end
  endtask

  // check the outputs for the phase the testbench expects
  task automatic check_phase(input state_t ph);
    check(state == ph, "phase");
    check(busy == (ph != ST_LOAD), "busy");
    case (ph)
      ST_LOAD:  check(cnt_en == we && a_we == we && !a_from_stage2 && !b_we && !out_valid, "load controls");
      ST_STEP1: check(cnt_en && !a_we && b_we && !win_sel && !out_valid, "step 1 controls");
      ST_STEP2: check(cnt_en && a_we && a_from_stage2 && !b_we && win_sel && !out_valid, "step 2 controls");
      ST_OUT:   check(cnt_en && !a_we && !b_we && !win_sel && out_valid, "output controls");
    endcase
  endtask

  // one scan of L cycles in phase ph; erase strobes at the given positions
  task automatic scan(input state_t ph, input int e1_at, input int e2_at);
    for (int p = 0; p < L; p++) begin
      @(negedge clk);
      we     = 1'($urandom);   // must be ignored while busy
      erase1 = (p == e1_at);
      erase2 = (p == e2_at);
      #1;
      check(pos == p, "counter position");
      check_phase(ph);
    end
  endtask

  task automatic load_frame();
    int n = 0;
    while (n < L) begin
      @(negedge clk);
      we = 1'($urandom);
      erase1 = 1'b1; erase2 = 1'b1;   // stage outputs are meaningless here
      #1;
      check_phase(ST_LOAD);
      if (we) n++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rstb = 1'b1;
    #1 check(state == ST_LOAD && !busy && !done && iter_count == 0, "after reset");
    load_frame();
    scan(ST_STEP1, 4, -1);   scan(ST_STEP2, -1, -1);
    #1 check(iter_count == 0, "no iteration counted yet");
    scan(ST_STEP1, -1, -1);  scan(ST_STEP2, -1, L - 1);
    scan(ST_STEP1, -1, -1);  scan(ST_STEP2, -1, -1);
    @(negedge clk);
    check(iter_count == 3, "three iterations");
    check(!done, "not done before output");
    pos = pos;   // output scan starts here
    for (int p = 0; p < L; p++) begin
      if (p > 0) @(negedge clk);
      we = 1'($urandom);
      #1 check_phase(ST_OUT);
    end
    @(negedge clk);
    we = 1'b0;
    #1 check(done && state == ST_LOAD && !busy, "done after output");
    check(iter_count == 3, "count held");
    repeat (3) @(negedge clk);
    check(done, "done held while idle");
    we = 1'b1;
    @(negedge clk);
    we = 1'b0;
    #1 check(!done, "done clears when the next frame loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
