// tb_frame_rate_estimator: 4 tiles, a 4-entry RTP table. Frame 1 is the
// learning frame with 5 RTPs (so the last table entry accumulates). In the
// following frames the render-target traffic is stopped at chosen points and
// the settled estimate is compared with the formula
//   F = ((lambda*C_cur + (1-lambda)*C_avg) >> 16) * N
// evaluated here from the cycle and update counts this bench itself drove.
// Frames slower and faster than the target check below_target both ways,
// and a frame with a very different RTP count must send the estimator back
// to learning mode. An estimate started after the traffic stops must be
// out within 400 cycles (two estimate computations).
module tb_frame_rate_estimator;
  localparam int NT = 4;
  localparam longint TARGET = 64'd400;
  logic clk = 1'b0, rst_n = 1'b0, upd_valid = 1'b0, frame_end = 1'b0;
  logic [1:0] upd_tile = '0;
  logic learning, pred_valid, below_target, relearn_event;
  logic [63:0] est_frame_cycles;
  int checks = 0, failures = 0, n_relearn = 0, n_below = 0, n_above = 0;

  // reference state
  longint posedges;        // posedges since reset release
  longint last_close;      // posedge of the last RTP close or empty frame end
  longint learn_n, learn_u, learn_cy;
  longint cur_j, cur_s, cur_d, open_u;

  frame_rate_estimator #(.NTILES(NT), .ENTRIES(4), .TARGET_CYCLES(TARGET)) dut (
    .clk, .rst_n, .upd_valid, .upd_tile, .num_tiles(3'(NT)), .frame_end,
    .learning, .pred_valid, .est_frame_cycles, .below_target, .relearn_event);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) posedges <= posedges + 1;
  always @(posedge clk) if (relearn_event) n_relearn++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One update at negedge; sampled at the next posedge.
  task automatic upd(int tile, bit closes, bit learn);
    upd_valid = 1'b1;
    upd_tile  = 2'(tile);
    @(negedge clk);
    upd_valid = 1'b0;
    open_u++;
    if (closes) begin
      longint cyc;
      cyc = posedges - last_close;
      last_close = posedges;
      if (learn) begin learn_n++; learn_u += open_u; learn_cy += cyc; end
      else begin cur_j++; cur_s += cyc; cur_d += open_u; end
      open_u = 0;
    end
  endtask

  // RTP with n updates (n >= 4) and a gap of g idle cycles after each update.
  task automatic rtp(int n, int g, bit learn);
    for (int i = 0; i < n; i++) begin
      int tile;
      tile = (i < n - 3) ? 0 : i - (n - 4);
      upd(tile, i == n - 1, learn);
      repeat (g) @(negedge clk);
    end
  endtask

  task automatic end_frame();
    frame_end = 1'b1;
    @(negedge clk);
    frame_end = 1'b0;
    if (open_u == 0) last_close = posedges;
    cur_j = 0; cur_s = 0; cur_d = 0;
  endtask

  task automatic check_estimate(string what);
    longint cavg, ccur, lam, crtp, f, d;
    repeat (400) @(negedge clk);
    cavg = learn_cy / learn_n;
    ccur = (cur_j == 0) ? cavg : cur_s / cur_j;
    d    = cur_d + open_u;
    lam  = (d * 65536) / learn_u;
    if (lam > 65536) lam = 65536;
    crtp = (lam * ccur + (65536 - lam) * cavg) >> 16;
    f    = crtp * learn_n;
    check(pred_valid && !learning, {what, ": prediction valid"});
    check(est_frame_cycles == 64'(f), $sformatf("%s: F=%0d want %0d", what, est_frame_cycles, f));
    check(below_target == (f > TARGET), {what, ": below_target"});
    if (f > TARGET) n_below++; else n_above++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    posedges = 0; last_close = 0; learn_n = 0; learn_u = 0; learn_cy = 0;
    cur_j = 0; cur_s = 0; cur_d = 0; open_u = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(learning == 1'b1, "starts in learning mode");
    // ---- learning frame: 5 RTPs of 6 updates, 10-cycle gaps ----
    for (int k = 0; k < 5; k++) rtp(6, 10, 1'b1);
    end_frame();
    @(negedge clk);
    check(learning == 1'b0, "prediction mode after one frame");
    // ---- frame 2: slow (gaps of 25) -> projected above target ----
    check_estimate("frame 2 start");
    rtp(6, 25, 1'b0);
    rtp(6, 25, 1'b0);
    check_estimate("frame 2 after 2 slow RTPs");
    rtp(6, 25, 1'b0);
    upd(0, 1'b0, 1'b0);
    upd(0, 1'b0, 1'b0);
    check_estimate("frame 2 mid-RTP");
    repeat (4) upd(1, 1'b0, 1'b0);
    upd(2, 1'b0, 1'b0);
    upd(3, 1'b1, 1'b0);
    rtp(6, 25, 1'b0);
    end_frame();
    @(negedge clk);
    check(learning == 1'b0, "similar frame keeps the learned data");
    // ---- frame 3: fast (gaps of 2) -> projected below target ----
    rtp(6, 2, 1'b0);
    rtp(6, 2, 1'b0);
    rtp(6, 2, 1'b0);
    check_estimate("frame 3 fast");
    rtp(6, 2, 1'b0);
    rtp(6, 2, 1'b0);
    end_frame();
    @(negedge clk);
    check(learning == 1'b0, "frame 3 matches");
    // ---- frame 4: only 2 RTPs -> mismatch, back to learning ----
    rtp(6, 2, 1'b0);
    rtp(6, 2, 1'b0);
    end_frame();
    @(negedge clk);
    check(learning == 1'b1, "mismatching frame triggers learning");
    check(n_relearn == 1, "one relearn event");
    // ---- frame 5: learn again with 3 RTPs of 8 updates ----
    learn_n = 0; learn_u = 0; learn_cy = 0;
    for (int k = 0; k < 3; k++) rtp(8, 5, 1'b1);
    end_frame();
    @(negedge clk);
    check(learning == 1'b0, "relearned");
    rtp(8, 5, 1'b0);
    check_estimate("after relearn");
    check(n_below > 0 && n_above > 0, "both sides of the target seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
