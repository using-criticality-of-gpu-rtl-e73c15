// tb_bottleneck_finder: random occupancy/throughput bits for the five unit
// types, with and without early-Z; after each evaluation period the
// registered bottleneck vector is compared with a step-by-step model of the
// back-to-front traversal. The update pulse spacing (the period) is checked.
module tb_bottleneck_finder;
  import crit_pkg::*;
  localparam int PERIOD = 8;
  logic clk = 1'b0, rst_n = 1'b0, early_z = 1'b0, update;
  unit_stat_t stat [NUM_UNIT_TYPES];
  bneck_t bneck;
  int checks = 0, failures = 0;
  int seen_bits [5];

  bottleneck_finder #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .early_z, .stat, .bneck, .update);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference: follows the listing of the traversal one step at a time.
  function automatic bneck_t model(unit_stat_t s [NUM_UNIT_TYPES], bit ez);
    bneck_t b;
    b = '0;
    if (!s[U_CW].th && s[U_CW].io) b.cw = 1;
    if (!s[U_BT].th && s[U_BT].io) b.bt = 1;
    if (s[U_CW].ao == 0) begin
      unit_e first, second;
      first  = ez ? U_SH : U_ZS;
      second = ez ? U_ZS : U_SH;
      // unit just in front of CW
      if (first == U_SH) begin if (!s[U_SH].th && s[U_SH].ao) b.sh = 1; end
      else               begin if (!s[U_ZS].th && s[U_ZS].io) b.zs = 1; end
      if (s[first].ao == 0) begin
        if (second == U_SH) begin if (!s[U_SH].th && s[U_SH].ao) b.sh = 1; end
        else                begin if (!s[U_ZS].th && s[U_ZS].io) b.zs = 1; end
        if (s[second].ao == 0) begin
          if (!s[U_FE].th && s[U_FE].io) begin b.fe = 1; b.sh = 1; b.zs = 1; end
        end
      end
    end
    return b;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NUM_UNIT_TYPES; t++) stat[t] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // align with the update pulse
    do begin @(posedge clk); #1; end while (!update);
    for (int r = 0; r < 3000; r++) begin
      bneck_t exp_b;
      int     waited;
      early_z = r[0];
      for (int t = 0; t < NUM_UNIT_TYPES; t++) begin
        stat[t].io = $urandom_range(0, 1);
        stat[t].ao = stat[t].io & ($urandom_range(0, 2) != 0);
        stat[t].th = ($urandom_range(0, 2) == 0);
      end
      exp_b = model(stat, early_z);
      // wait for the next evaluation
      waited = 0;
      do begin @(posedge clk); #1; waited++; end while (!update);
      check(waited == PERIOD, $sformatf("update after %0d cycles, want %0d", waited, PERIOD));
      check(bneck == exp_b, $sformatf("round %0d ez=%0d: got %b want %b", r, early_z, bneck, exp_b));
      if (bneck.fe) seen_bits[0]++;
      if (bneck.zs) seen_bits[1]++;
      if (bneck.sh) seen_bits[2]++;
      if (bneck.cw) seen_bits[3]++;
      if (bneck.bt) seen_bits[4]++;
    end
    for (int k = 0; k < 5; k++) check(seen_bits[k] > 0, $sformatf("bottleneck bit %0d never seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
