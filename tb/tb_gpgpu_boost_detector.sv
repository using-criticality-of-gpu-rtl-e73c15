// tb_gpgpu_boost_detector: 50-cycle windows, a probe every 3 windows. The
// bench retires a chosen number of instructions per window: a probe window
// that does better than the window before keeps the boost on, an equal
// window ends it. The boost pattern over the windows is compared with a
// model, and boost must stay off while the detector is disabled.
module tb_gpgpu_boost_detector;
  localparam int WIN = 50, PROBE = 3;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [7:0] retired = '0;
  logic boost, window_end;
  int checks = 0, failures = 0, n_boost_win = 0, n_kept = 0;

  gpgpu_boost_detector #(.WINDOW(WIN), .PROBE_EVERY(PROBE)) dut (
    .clk, .rst_n, .enable, .retired, .boost, .window_end);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit  mb;
    int  since;
    longint last;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (200) @(negedge clk);
    check(boost == 1'b0, "disabled: no boost");
    enable = 1'b1;
    mb = 0; since = 0; last = 0;
    for (int w = 0; w < 120; w++) begin
      int per;
      longint tot;
      check(boost == mb, $sformatf("window %0d boost=%0d want %0d", w, boost, mb));
      // while boosted, performance rises for a few windows then flattens
      if (mb) per = (w % 7 < 3) ? 3 + (w % 7) : 2;
      else    per = 2;
      tot = 0;
      for (int c = 0; c < WIN; c++) begin
        retired = 8'(per);
        tot += per;
        @(negedge clk);
      end
      if (mb) begin
        n_boost_win++;
        if (tot > last) n_kept++;
        mb = (tot > last);
        since = 0;
      end else if (since == PROBE - 1) begin
        mb = 1; since = 0;
      end else since++;
      last = tot;
    end
    check(n_boost_win > 0 && n_kept > 0, "probes and extended boosts seen");
    enable = 1'b0;
    @(negedge clk);
    check(boost == 1'b0, "disable clears boost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
