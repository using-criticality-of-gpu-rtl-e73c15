// tb_sat_counter: drives random up/down requests into an 8-bit saturating
// counter and compares count and above_mid with a reference model every
// cycle; long up and down runs check both saturation limits and the reset
// value 128.
module tb_sat_counter;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, up = 1'b0;
  logic [7:0] count;
  logic       above_mid;
  int checks = 0, failures = 0;
  int model;

  sat_counter #(.W(8)) dut (.clk, .rst_n, .clear, .up, .count, .above_mid);

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
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    model = 128;
    #1;
    check(count == 8'd128, "reset value");
    for (int i = 0; i < 3000; i++) begin
      if (i < 300)       up = 1'b1;        // saturate high
      else if (i < 700)  up = 1'b0;        // saturate low
      else               up = ($urandom_range(0, 1) == 1);
      clear = (i == 2500);
      @(posedge clk);
      if (clear)        model = 128;
      else if (up)      model = (model < 255) ? model + 1 : 255;
      else              model = (model > 0) ? model - 1 : 0;
      @(negedge clk);
      check(count == 8'(model), $sformatf("count %0d != %0d at %0d", count, model, i));
      check(above_mid == (model > 128), "above_mid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
