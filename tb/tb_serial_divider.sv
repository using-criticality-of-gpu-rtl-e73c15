// tb_serial_divider: random 16-bit divisions (with small divisors, equal
// operands and division by zero mixed in); quotient, remainder and the
// 16-cycle latency from start to done are checked.
module tb_serial_divider;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [W-1:0] dividend = '0, divisor = '0, quotient, remainder;
  int checks = 0, failures = 0;

  serial_divider #(.W(W)) dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quotient, .remainder);

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
    for (int n = 0; n < 2000; n++) begin
      int lat;
      int unsigned a, b;
      a = $urandom_range(0, 65535);
      case (n % 5)
        0: b = 0;
        1: b = $urandom_range(1, 15);
        2: b = a;
        default: b = $urandom_range(1, 65535);
      endcase
      dividend = W'(a);
      divisor  = W'(b);
      start    = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == W + 1, $sformatf("latency %0d", lat));
      if (b == 0) check(quotient == '1 && remainder == W'(a), "divide by zero");
      else check(quotient == W'(a / b) && remainder == W'(a % b),
                 $sformatf("%0d / %0d = %0d r %0d", a, b, quotient, remainder));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
