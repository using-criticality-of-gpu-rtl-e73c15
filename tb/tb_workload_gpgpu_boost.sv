// tb_workload_gpgpu_boost: the GPGPU boost detector at its default size
// (100,000-cycle windows, a probe every 10 windows) driven by a closed-loop
// model of a GPGPU kernel with two phases.
//
// The shader cores retire instructions at a steady rate per window, set
// here in instructions per 100 cycles. In the compute-bound phase (the first
// 30 windows) the rate is 150 whether or not GPU accesses are boosted, so a
// boosted window does no better than the one before. In the memory-sensitive
// phase (the next 30 windows) the rate is 80 without boost, and in the k-th
// consecutive boosted window 80 + 10k, capped at 120: boosting helps for
// four windows and then no more. The detector sees only the retired
// instruction counts.
//
// Checks, on each boost episode that starts and ends within one phase:
//  * compute phase: the probe window is the whole episode (one window);
//  * memory phase: the boost is kept while the rate climbs and dropped after
//    the first window that does no better, five windows in all;
//  * probes happen in both phases, and the first one comes after ten
//    unboosted windows.
module tb_workload_gpgpu_boost;
  localparam int WINDOW = 100_000, NWIN = 60, SWITCH = 30;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [7:0] retired = '0;
  logic boost, window_end;
  int checks = 0, failures = 0;

  gpgpu_boost_detector dut (.clk, .rst_n, .enable, .retired, .boost, .window_end);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (WINDOW * (NWIN + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit boosted [NWIN];
    int acc, k, ep_start, n_ep [2];
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n  = 1'b1;
    enable = 1'b1;
    acc = 0;
    k   = 0;
    for (int w = 0; w < NWIN; w++) begin
      int rate;
      boosted[w] = boost;                        // boost holds for the whole window
      k = boost ? k + 1 : 0;
      if (w < SWITCH) rate = 150;
      else            rate = boost ? ((80 + 10 * k > 120) ? 120 : 80 + 10 * k) : 80;
      for (int c = 0; c < WINDOW; c++) begin
        acc    += rate;
        retired = 8'(acc / 100);
        acc    %= 100;
        @(negedge clk);
      end
    end
    retired = '0;
    // episodes
    n_ep = '{0, 0};
    ep_start = -1;
    for (int w = 0; w <= NWIN; w++) begin
      bit b;
      b = (w < NWIN) && boosted[w];
      if (b && ep_start < 0) ep_start = w;
      if (!b && ep_start >= 0) begin
        int len, ph;
        len = w - ep_start;
        ph  = (ep_start >= SWITCH);
        if ((ep_start < SWITCH) == (w - 1 < SWITCH) && w < NWIN) begin
          n_ep[ph]++;
          $display("phase %0d: boost in windows %0d..%0d", ph, ep_start, w - 1);
          if (ph == 0) check(len == 1, $sformatf("compute phase: episode of %0d windows, want 1", len));
          else         check(len == 5, $sformatf("memory phase: episode of %0d windows, want 5", len));
        end
        ep_start = -1;
      end
    end
    check(n_ep[0] > 0 && n_ep[1] > 0, $sformatf("probes in both phases (%0d, %0d)", n_ep[0], n_ep[1]));
    begin
      int first;
      first = -1;
      for (int w = NWIN - 1; w >= 0; w--) if (boosted[w]) first = w;
      check(first == 10, $sformatf("first probe in window %0d, want 10", first));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
