// tb_gpu_miss_rate_monitor: intervals of 100 cycles with chosen miss
// fractions around the 80% bound (including exactly 80% and an empty
// interval); rate_ok is checked right after each interval end.
module tb_gpu_miss_rate_monitor;
  localparam int IV = 100;
  logic clk = 1'b0, rst_n = 1'b0, access = 1'b0, miss = 1'b0;
  logic rate_ok;
  int checks = 0, failures = 0;

  gpu_miss_rate_monitor #(.INTERVAL(IV)) dut (.clk, .rst_n, .access, .miss, .rate_ok);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(rate_ok == 1'b1, "reset state");
    for (int r = 0; r < 60; r++) begin
      int na, nm;
      na = (r % 7 == 6) ? 0 : $urandom_range(10, 50);
      case (r % 4)
        0: nm = na;                // 100%
        1: nm = (na * 4) / 5;      // at most 80%
        2: nm = (na * 4 + 4) / 5;  // just above when not exact
        default: nm = $urandom_range(0, na);
      endcase
      for (int c = 0; c < IV; c++) begin
        access = (c < na);
        miss   = (c < nm);
        @(negedge clk);
      end
      access = 0; miss = 0;
      check(rate_ok == (nm * 5 <= na * 4), $sformatf("interval %0d na=%0d nm=%0d ok=%0d", r, na, nm, rate_ok));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
