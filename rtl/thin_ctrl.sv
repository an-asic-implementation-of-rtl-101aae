// thin_ctrl: sequencer of the thinning processor.
//
// Phases (thin_pkg::state_t):
//   ST_LOAD   Idle. Every cycle with we = 1 one pixel of image_in is written
//             into Memory A at the counter address and the counter steps.
//             When the last pixel of the frame is written, thinning starts.
//   ST_STEP1  One full scan: each window of Memory A goes through stage 1
//             and the result is written into Memory B at the same address.
//   ST_STEP2  One full scan: each window of Memory B goes through stage 2
//             and the result is written back into Memory A.
//             At the end of the scan one iteration is complete; if either
//             scan of it erased a pixel another iteration follows,
//             otherwise the image has converged to its skeleton.
//   ST_OUT    One full scan that presents the skeleton, pixel by pixel in
//             raster order, with out_valid = 1; then back to ST_LOAD with
//             done = 1 (held until the next frame starts loading).
//
// Interface: cnt_last comes from the pixel counter, erase1/erase2 from the
// two stage blocks. The outputs steer the counter, the two memory write
// ports, the window source and the output stream.
// Timing: each scan is exactly W*H cycles with no gap between scans, so one
// iteration takes 2*W*H cycles (61,440 at 160 x 192) and a frame takes
// W*H (load) + iterations*2*W*H + W*H (output) cycles.
// Alternating passes between the two memories and repeating the iterations
// follow the method; the convergence test, the output scan, the automatic
// start after loading and the status outputs are this design's choices.
module thin_ctrl (
  input  logic              clk,
  input  logic              rstb,
  input  logic              we,         // image pixel strobe
  input  logic              cnt_last,   // counter is at the last pixel
  input  logic              erase1,     // stage 1 erases the current pixel
  input  logic              erase2,     // stage 2 erases the current pixel
  output logic              cnt_en,
  output logic              a_we,       // write Memory A
  output logic              a_from_stage2, // Memory A data: 0 = image_in, 1 = stage 2
  output logic              b_we,       // write Memory B
  output logic              win_sel,    // window source: 0 = Memory A, 1 = Memory B
  output logic              out_valid,  // skeleton pixel on the output
  output logic              busy,
  output logic              done,
  output logic [7:0]        iter_count  // iterations (step 1 + step 2) completed
);

  import thin_pkg::*;

  state_t state;
  logic   changed;   // a pixel was erased during the current iteration

  always_comb begin
    cnt_en        = 1'b0;
    a_we          = 1'b0;
    a_from_stage2 = 1'b0;
    b_we          = 1'b0;
    win_sel       = 1'b0;
    out_valid     = 1'b0;
    unique case (state)
      ST_LOAD: begin
        cnt_en = we;
        a_we   = we;
      end
      ST_STEP1: begin
        cnt_en = 1'b1;
        b_we   = 1'b1;
      end
      ST_STEP2: begin
        cnt_en        = 1'b1;
        a_we          = 1'b1;
        a_from_stage2 = 1'b1;
        win_sel       = 1'b1;
      end
      ST_OUT: begin
        cnt_en    = 1'b1;
        out_valid = 1'b1;
      end
    endcase
  end

  assign busy = (state != ST_LOAD);

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) begin
      state      <= ST_LOAD;
      changed    <= 1'b0;
      done       <= 1'b0;
      iter_count <= '0;
    end else begin
      unique case (state)
        ST_LOAD: begin
          if (we) begin
            done <= 1'b0;
            if (cnt_last) begin
              state      <= ST_STEP1;
              changed    <= 1'b0;
              iter_count <= '0;
            end
          end
        end
        ST_STEP1: begin
          if (erase1) changed <= 1'b1;
          if (cnt_last) state <= ST_STEP2;
        end
        ST_STEP2: begin
          if (erase2) changed <= 1'b1;
          if (cnt_last) begin
            iter_count <= iter_count + 1'b1;
            changed    <= 1'b0;
            state      <= (changed || erase2) ? ST_STEP1 : ST_OUT;
          end
        end
        ST_OUT: begin
          if (cnt_last) begin
            state <= ST_LOAD;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  // A phase may only end on the last pixel of a scan, so that the next one
  // starts at address (0, 0).
  property p_phase_ends_on_last;
    @(posedge clk) disable iff (!rstb)
      ($past(rstb) && state != $past(state)) |-> $past(cnt_en && cnt_last);
  endproperty
  a_phase_ends_on_last: assert property (p_phase_ends_on_last);

  // The iteration count must not wrap.
  a_iter_no_wrap: assert property (@(posedge clk) disable iff (!rstb)
    (state == ST_STEP2 && cnt_last) |-> (iter_count != 8'hFF));

endmodule
