// tb_im_sched_prob: intervals of 200 cycles with a chosen number of served
// CPU requests, a chosen share of them passed over; the probability
// published after each interval must equal floor(deprio * 65536 / served)
// capped at 0x8000, and 0 for an interval without CPU requests. It must
// appear within 40 cycles of the interval end. Traffic intervals alternate
// with idle ones.
module tb_im_sched_prob;
  localparam int IV = 200;
  logic clk = 1'b0, rst_n = 1'b0, cpu_served = 1'b0, cpu_deprio = 1'b0;
  logic [15:0] prob_q16;
  logic interval_end;
  int checks = 0, failures = 0, n_cap = 0;

  im_sched_prob #(.INTERVAL(IV)) dut (.clk, .rst_n, .cpu_served, .cpu_deprio, .prob_q16, .interval_end);

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
    for (int r = 0; r < 40; r++) begin
      int ns, nd;
      longint e;
      ns = (r % 9 == 8) ? 0 : $urandom_range(1, 150);
      nd = (r % 3 == 0) ? $urandom_range(ns / 2, ns) : $urandom_range(0, ns / 2);
      for (int c = 0; c < IV; c++) begin
        cpu_served = (c < ns);
        cpu_deprio = (c < nd);
        @(negedge clk);
      end
      cpu_served = 0; cpu_deprio = 0;
      e = (ns == 0) ? 0 : (longint'(nd) * 65536) / ns;
      if (e > 32768) begin e = 32768; n_cap++; end
      // result of the serial division, 40 cycles into the next interval
      repeat (40) @(negedge clk);
      check(prob_q16 == 16'(e), $sformatf("interval %0d ns=%0d nd=%0d: got %0d want %0d", r, ns, nd, prob_q16, e));
      // rest of that interval idle: it publishes 0 at its end
      repeat (IV - 40) @(negedge clk);
      repeat (40) @(negedge clk);
      check(prob_q16 == 16'd0, "idle interval gives 0");
      repeat (IV - 40) @(negedge clk);
    end
    check(n_cap > 0, "cap reached at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
