// tb_shader_stall_monitor: random dispatch-stall / no-commit patterns with
// varying bias; both counters are modelled here and the registered
// bottleneck decision is checked after each evaluation pulse.
module tb_shader_stall_monitor;
  logic clk = 1'b0, rst_n = 1'b0, dispatch_stall = 1'b0, commit_none = 1'b0, eval = 1'b0;
  logic bottleneck;
  int checks = 0, failures = 0, n_bneck = 0, n_free = 0;
  int mi, mo;
  bit expect_b;

  shader_stall_monitor dut (.clk, .rst_n, .dispatch_stall, .commit_none, .eval, .bottleneck);

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
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    mi = 128; mo = 128; expect_b = 0;
    for (int i = 0; i < 20000; i++) begin
      int bias;
      bias = (i / 700) % 4;    // 0: both low, 1: in only, 2: both high, 3: mixed
      dispatch_stall = (bias == 1 || bias == 2) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 3);
      commit_none    = (bias == 2 || bias == 3) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 3);
      eval = (i % 50 == 49);
      @(posedge clk);
      if (eval) expect_b = (mi > 128) && (mo > 128);
      mi = dispatch_stall ? ((mi < 255) ? mi + 1 : 255) : ((mi > 0) ? mi - 1 : 0);
      mo = commit_none    ? ((mo < 255) ? mo + 1 : 255) : ((mo > 0) ? mo - 1 : 0);
      @(negedge clk);
      if (eval) begin
        check(bottleneck == expect_b, $sformatf("cycle %0d: got %0d want %0d", i, bottleneck, expect_b));
        if (expect_b) n_bneck++; else n_free++;
      end
    end
    check(n_bneck > 0 && n_free > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
