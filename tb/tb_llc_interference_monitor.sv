// tb_llc_interference_monitor: four CPU applications, 100-cycle intervals,
// 25 LLC lookups per application per interval with a random miss count.
// The class (L/M/H by the 10% and 70% bounds) and the emergency-mode state
// machine are modelled here and compared after every interval; entering,
// staying in and leaving emergency mode must all occur. The first interval
// has no predecessor: an application in M or H there must not enter
// emergency mode.
module tb_llc_interference_monitor;
  import crit_pkg::*;
  localparam int IV = 100, NCPU = 4;
  logic clk = 1'b0, rst_n = 1'b0, acc_valid = 1'b0, acc_miss = 1'b0;
  logic [1:0] acc_cpu = '0;
  intensity_e cls [NCPU];
  logic [NCPU-1:0] emergency;
  logic active, interval_end;
  int checks = 0, failures = 0, n_enter = 0, n_stay = 0, n_exit = 0;

  llc_interference_monitor #(.N_CPU(NCPU), .INTERVAL(IV)) dut (
    .clk, .rst_n, .acc_valid, .acc_cpu, .acc_miss, .cls, .emergency, .active, .interval_end);

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
    int mcls [NCPU];
    bit memg [NCPU];
    for (int i = 0; i < NCPU; i++) begin mcls[i] = 0; memg[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      int nm [NCPU];
      int seen [NCPU];
      for (int i = 0; i < NCPU; i++) begin
        int pick;
        pick = $urandom_range(0, 9);
        nm[i] = (pick < 5) ? $urandom_range(0, 2) : (pick < 8) ? $urandom_range(3, 17) : $urandom_range(18, 25);
        seen[i] = 0;
      end
      for (int c = 0; c < IV; c++) begin
        int id;
        id = c % NCPU;
        acc_valid = (c < 25 * NCPU);
        acc_cpu   = 2'(id);
        acc_miss  = (seen[id] < nm[id]);
        if (acc_valid) seen[id]++;
        @(negedge clk);
      end
      acc_valid = 0;
      for (int i = 0; i < NCPU; i++) begin
        int nc;
        nc = (nm[i] * 100 > 25 * 70) ? 2 : (nm[i] * 100 > 25 * 10) ? 1 : 0;
        if (memg[i]) begin
          if (nc != 0) begin memg[i] = 0; n_exit++; end else n_stay++;
        end else if (r > 0 && mcls[i] == 0 && nc != 0) begin
          memg[i] = 1; n_enter++;
        end
        mcls[i] = nc;
        check(int'(cls[i]) == nc, $sformatf("interval %0d cpu %0d class %0d want %0d", r, i, cls[i], nc));
        check(emergency[i] == memg[i], $sformatf("interval %0d cpu %0d emergency", r, i));
      end
      check(active == (|emergency), "active");
    end
    check(n_enter > 0 && n_stay > 0 && n_exit > 0, "enter, stay and exit all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
