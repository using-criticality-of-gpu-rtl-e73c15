// tb_rtp_tracker: capacity 8 tiles; the first half of the run uses all 8,
// the second half a 6-tile render target (indices 6 and 7 then touch
// nothing). Random updates (with idle cycles) and occasional frame ends. A reference tracks the touched set and counts, and every
// reported RTP (updates, cycles, tiles) and frame_done pulse is checked.
module tb_rtp_tracker;
  localparam int NT = 8;
  logic clk = 1'b0, rst_n = 1'b0, upd_valid = 1'b0, frame_end = 1'b0;
  logic [2:0] upd_tile = '0;
  logic [3:0] num_tiles = 4'(NT);
  logic rtp_done, frame_done;
  logic [31:0] rtp_updates, rtp_cycles, rtp_tiles, cur_updates;
  int checks = 0, failures = 0, n_full = 0, n_partial = 0;

  rtp_tracker #(.NTILES(NT)) dut (.clk, .rst_n, .upd_valid, .upd_tile, .num_tiles, .frame_end,
    .rtp_done, .frame_done, .rtp_updates, .rtp_cycles, .rtp_tiles, .cur_updates);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit touched [NT];
    int nu, ncyc, nt;
    for (int i = 0; i < NT; i++) touched[i] = 0;
    nu = 0; ncyc = 0; nt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      bit close, e_part;
      if (c >= 10000 && nt == 0 && nu == 0) num_tiles = 4'(NT - 2);
      upd_valid = ($urandom_range(0, 2) != 0);
      upd_tile  = 3'($urandom_range(0, NT - 1));
      frame_end = ($urandom_range(0, 150) == 0);
      // reference
      ncyc++;
      if (upd_valid) begin
        nu++;
        if (upd_tile < num_tiles && !touched[upd_tile]) begin touched[upd_tile] = 1; nt++; end
      end
      close  = (nt == int'(num_tiles)) || (frame_end && nu != 0);
      e_part = frame_end && nt != int'(num_tiles) && nu != 0;
      @(negedge clk);
      check(rtp_done == close, $sformatf("rtp_done at %0d", c));
      check(frame_done == frame_end, "frame_done");
      if (close) begin
        check(rtp_updates == 32'(nu) && rtp_cycles == 32'(ncyc) && rtp_tiles == 32'(nt),
              $sformatf("rtp %0d/%0d/%0d vs %0d/%0d/%0d", rtp_updates, rtp_cycles, rtp_tiles, nu, ncyc, nt));
        if (e_part) n_partial++; else n_full++;
      end
      if (close || frame_end) begin
        for (int i = 0; i < NT; i++) if (close) touched[i] = 0;
        if (close) begin nu = 0; nt = 0; end
        ncyc = 0;
      end
      check(cur_updates == 32'(nu), "cur_updates");
    end
    check(n_full > 0 && n_partial > 0, "full and partial RTPs seen");
    check(num_tiles == 4'(NT - 2), "smaller render target used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
