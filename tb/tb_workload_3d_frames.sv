// tb_workload_3d_frames: frame-rate estimation on game-like frame
// sequences at the three screen sizes of the evaluated games: 1280x1024,
// 1920x1200 and 1600x1200 in 64x64 tiles (320, 570 and 475 tiles). The
// estimator keeps its default 570-tile capacity and 64-entry RTP table; only
// the frame-time target is scaled to 50,000 cycles so that whole frames can
// be simulated (a real 40 frames/s frame is 25 million cycles).
//
// Each frame is 70 render target planes (more than the table holds, so the
// last entry accumulates), each plane one update per tile plus a few
// overdraw updates. Per screen size the sequence is
//   1. learning frame, one update per cycle;
//   2. the same frame again: the estimate must match the learned frame time
//      within 2 % at mid-frame and at the end, and stay under the target;
//   3. a frame three times slower (idle cycles between updates, same work):
//      at mid-frame the estimate must follow the blend of the learned and
//      the current speed, lambda * 3 + (1 - lambda) times the learned
//      length, lambda being the fraction of the learned updates done; by the
//      end it must be within 5 % of the frame's real length and above the
//      target;
//   4. a frame of 50 planes: the estimator must discard what it learned.
// The frame lengths are measured here, independently of the design.
module tb_workload_3d_frames;
  localparam int NT_MAX = 570;
  localparam longint TARGET = 50_000;
  localparam int NRTP = 70;

  logic clk = 1'b0, rst_n = 1'b0, upd_valid = 1'b0, frame_end = 1'b0;
  logic [9:0]  upd_tile = '0;
  logic [10:0] num_tiles = 11'd320;
  logic learning, pred_valid, below_target, relearn_event;
  logic [63:0] est_frame_cycles;
  int checks = 0, failures = 0;
  int n_relearn = 0, n_below = 0, n_meets = 0;
  longint upd_count = 0, upd_learned = 1;

  frame_rate_estimator #(.TARGET_CYCLES(TARGET)) dut (
    .clk, .rst_n, .upd_valid, .upd_tile, .num_tiles, .frame_end,
    .learning, .pred_valid, .est_frame_cycles, .below_target, .relearn_event
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && relearn_event) n_relearn++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(longint a, longint b, int pct);
    longint d;
    d = (a > b) ? a - b : b - a;
    return d * 100 <= b * pct;
  endfunction

  // One update, then `gap - 1` idle cycles.
  task automatic update(int tile, int gap);
    upd_valid = 1'b1;
    upd_tile  = 10'(tile);
    upd_count++;
    @(negedge clk);
    upd_valid = 1'b0;
    repeat (gap - 1) @(negedge clk);
  endtask

  // One frame of `nrtp` planes. Returns its length in cycles, counted from
  // the first cycle after the previous frame end up to its own frame end.
  // When `probe` is set, the estimate is checked against `expect_cycles`
  // at mid-frame and just before the frame end.
  task automatic frame(int nt, int nrtp, int gap, bit probe, longint learned_len,
                       longint expect_cycles, int pct, output longint len);
    longint start;
    start = longint'($time / 10);
    upd_count = 0;
    for (int k = 0; k < nrtp; k++) begin
      for (int t = 0; t < nt - 1; t++) update(t, gap);
      for (int e = 0; e < k % 5; e++) update(0, gap);     // overdraw
      update(nt - 1, gap);
      if (probe && k == nrtp / 2) begin
        real lambda;
        longint mid_expect;
        repeat (200) @(negedge clk);                       // let an estimate finish
        lambda     = real'(upd_count) / real'(upd_learned);
        mid_expect = longint'((lambda * gap + (1.0 - lambda)) * real'(learned_len));
        check(pred_valid && near(longint'(est_frame_cycles), mid_expect, pct),
              $sformatf("mid-frame estimate %0d vs %0d (%0d tiles)", est_frame_cycles, mid_expect, nt));
      end
    end
    if (probe) begin
      repeat (200) @(negedge clk);
      check(pred_valid && near(longint'(est_frame_cycles), expect_cycles, pct),
            $sformatf("end-of-frame estimate %0d vs %0d (%0d tiles)", est_frame_cycles, expect_cycles, nt));
    end
    frame_end = 1'b1;
    @(negedge clk);
    frame_end = 1'b0;
    len = longint'($time / 10) - start;
  endtask

  initial begin
    int sizes [3] = '{320, 570, 475};
    longint l_learn, l_same, l_slow, l_short;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      int nt;
      nt = sizes[s];
      num_tiles = 11'(nt);
      check(learning, $sformatf("learning frame starts (%0d tiles)", nt));
      // 1. learning
      frame(nt, NRTP, 1, 1'b0, 0, 0, 0, l_learn);
      upd_learned = upd_count;
      @(negedge clk);
      check(!learning, "prediction mode after the learning frame");
      // 2. same frame: the mid-frame probe and the end probe add 400 idle
      //    cycles, accounted for in the expected length
      frame(nt, NRTP, 1, 1'b1, l_learn, l_learn, 2, l_same);
      check(!below_target, $sformatf("frame of %0d cycles meets the %0d-cycle target", l_same, TARGET));
      if (!below_target) n_meets++;
      // 3. three times slower
      begin
        longint slow_expect;
        slow_expect = 3 * l_learn + 400;
        frame(nt, NRTP, 3, 1'b1, l_learn, slow_expect, 5, l_slow);
        check(below_target, $sformatf("frame of %0d cycles misses the target", l_slow));
        if (below_target) n_below++;
      end
      // 4. different plane count: relearn
      begin
        int n_prev;
        n_prev = n_relearn;
        frame(nt, 50, 1, 1'b0, 0, 0, 0, l_short);
        repeat (2) @(negedge clk);
        check(n_relearn == n_prev + 1 && learning, $sformatf("relearning after a 50-plane frame (%0d tiles)", nt));
      end
      $display("%0d tiles: learned frame %0d cycles, slow frame %0d cycles, estimate %0d",
               nt, l_learn, l_slow, est_frame_cycles);
    end
    check(n_meets == 3 && n_below == 3 && n_relearn == 3,
          $sformatf("target met (%0d), missed (%0d) and relearning (%0d) at every size", n_meets, n_below, n_relearn));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
