// tb_flow_monitor: random pending/completed counts against fixed thresholds;
// a reference model of both saturating counters checks c_in, c_out and the
// two above-mid-point flags each cycle.
module tb_flow_monitor;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] pending, completed, th_in, th_out, c_in, c_out;
  logic in_high, out_high;
  int checks = 0, failures = 0;
  int mi, mo;

  flow_monitor dut (.clk, .rst_n, .clear(1'b0), .pending, .completed, .th_in, .th_out,
                    .in_high, .out_high, .c_in, .c_out);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    th_in = 8'd10; th_out = 8'd3; pending = '0; completed = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    mi = 128; mo = 128;
    for (int i = 0; i < 2000; i++) begin
      // phases biased high then low
      pending   = 8'($urandom_range(0, (i / 500) % 2 == 0 ? 20 : 12));
      completed = 8'($urandom_range(0, (i / 500) % 2 == 0 ? 4 : 8));
      @(posedge clk);
      mi = (pending > th_in)    ? ((mi < 255) ? mi + 1 : 255) : ((mi > 0) ? mi - 1 : 0);
      mo = (completed > th_out) ? ((mo < 255) ? mo + 1 : 255) : ((mo > 0) ? mo - 1 : 0);
      @(negedge clk);
      check(c_in == 8'(mi) && c_out == 8'(mo), $sformatf("counters %0d/%0d vs %0d/%0d", c_in, c_out, mi, mo));
      check(in_high == (mi > 128) && out_high == (mo > 128), "flags");
    end
    // exact threshold does not count as above
    pending = th_in; completed = th_out;
    @(posedge clk);
    mi = (mi > 0) ? mi - 1 : 0; mo = (mo > 0) ? mo - 1 : 0;
    @(negedge clk);
    check(c_in == 8'(mi) && c_out == 8'(mo), "equal to threshold counts down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
