// tb_workload_gpgpu: the GPGPU criticality classifier at its default size
// (16 shader cores, 16-entry stall tables, 1024-cycle evaluation period,
// 65536-cycle miss-rate interval) under a synthetic CUDA-like kernel.
//
// Every core runs a kernel with 12 static loads whose stall shares follow a
// 1/(i+1) profile, so a few loads cause most stall cycles. About a third of
// the cores are compute bound (rarely stall, usually commit); the others are
// memory bound (mostly stalled at dispatch, rarely commit). The GPU LLC miss
// rate is 50 % for the first two miss-rate intervals and 95 % afterwards.
// The thread configurations of the evaluated kernels change how long such a
// run lasts, not what the hardware sees, so one testbench covers them.
//
// A reference model kept here holds every core's exact stall counts in
// table-slot order and derives the top set (PCs taken, largest first, while
// the cycles of those ahead are under 90 % of the total). Every 1000 cycles
// each core is asked about each of its 12 loads and one unknown PC, and the
// critical and bypass outputs are compared with the rule: critical iff the
// core is bottlenecked and (the PC is a top PC, or the PC is unknown and the
// last interval's miss rate was at most 80 %). Core bottleneck bits are
// checked against the core's class. Checks near a miss-rate interval
// boundary are skipped for the unknown PC.
module tb_workload_gpgpu;
  localparam int NC = 16, NPC = 12, INTERVAL = 65536;
  localparam int CYCLES = 220_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0] dispatch_stall = '0, commit_none = '0, stall_valid = '0, core_bottleneck;
  logic [31:0] stall_pc [NC];
  logic llc_access = 1'b0, llc_miss = 1'b0;
  logic [3:0] req_core = '0;
  logic [31:0] req_pc = '0;
  logic req_critical, req_bypass;
  int checks = 0, failures = 0;
  int n_crit = 0, n_noncrit_known = 0, n_unknown_crit = 0, n_unknown_noncrit = 0;

  gpgpu_classifier dut (
    .clk, .rst_n, .dispatch_stall, .commit_none, .stall_valid, .stall_pc,
    .llc_access, .llc_miss, .req_core, .req_pc, .req_critical, .req_bypass, .core_bottleneck);

  always #5 clk = ~clk;

  // cycles since reset release, as the design's interval counters see them
  longint ncyc = 0;
  always @(posedge clk) if (rst_n) ncyc <= ncyc + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (CYCLES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  bit          mem_bound [NC];
  longint      cnt  [NC][NPC];     // stall cycles per load
  int          slot [NC][NPC];     // table slot (order of first stall), -1 if absent
  int          nslots [NC];

  function automatic logic [31:0] pc_of(int c, int i);
    return 32'h0040_0000 + 32'(c) * 32'h1000 + 32'(i) * 32'h10;
  endfunction

  function automatic bit is_top(int c, int i);
    longint total, ahead;
    total = 0;
    ahead = 0;
    for (int j = 0; j < NPC; j++) total += cnt[c][j];
    for (int j = 0; j < NPC; j++)
      if (j != i && slot[c][j] >= 0 &&
          (cnt[c][j] > cnt[c][i] || (cnt[c][j] == cnt[c][i] && slot[c][j] < slot[c][i])))
        ahead += cnt[c][j];
    return slot[c][i] >= 0 && ahead * 10 < total * 9;
  endfunction

  // load index drawn with weight 1/(i+1)
  function automatic int pick_load();
    int w [NPC];
    int sum, r;
    sum = 0;
    for (int i = 0; i < NPC; i++) begin w[i] = 2772 / (i + 1); sum += w[i]; end
    r = $urandom_range(0, sum - 1);
    for (int i = 0; i < NPC; i++) begin
      if (r < w[i]) return i;
      r -= w[i];
    end
    return NPC - 1;
  endfunction

  initial begin
    int n_mem;
    n_mem = 0;
    for (int c = 0; c < NC; c++) begin
      mem_bound[c] = (c % 3 != 0);
      if (mem_bound[c]) n_mem++;
      stall_pc[c] = '0;
      nslots[c] = 0;
      for (int i = 0; i < NPC; i++) begin cnt[c][i] = 0; slot[c][i] = -1; end
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      // ---- checks, against the state of all events so far ----
      if (cyc >= 4000 && cyc % 1000 == 0) begin
        // the clock runs on while the lookups are made: hold the stall
        // tables still and the cores in their class meanwhile
        for (int c = 0; c < NC; c++) begin
          stall_valid[c]    = 1'b0;
          dispatch_stall[c] = mem_bound[c];
          commit_none[c]    = mem_bound[c];
        end
        llc_access = 1'b0;
        llc_miss   = 1'b0;
        for (int c = 0; c < NC; c++) begin
          check(core_bottleneck[c] == mem_bound[c], $sformatf("core %0d bottleneck %0d", c, core_bottleneck[c]));
          for (int i = 0; i <= NPC; i++) begin
            bit exp_c, known, rate_ok_ref, near_edge;
            rate_ok_ref = (ncyc < 3 * INTERVAL);
            near_edge   = (ncyc > 3 * INTERVAL - 20 && ncyc < 3 * INTERVAL + 20);
            known = (i < NPC) && slot[c][i] >= 0;
            if (i == NPC && near_edge) continue;
            if (known) exp_c = mem_bound[c] && is_top(c, i);
            else       exp_c = mem_bound[c] && rate_ok_ref;
            req_core = 4'(c);
            req_pc   = (i < NPC) ? pc_of(c, i) : 32'hDEAD_0000 + 32'(c);
            #1;
            check(req_critical == exp_c && req_bypass == !exp_c,
                  $sformatf("cycle %0d core %0d load %0d: critical %0d want %0d", cyc, c, i, req_critical, exp_c));
            if (known && exp_c) n_crit++;
            if (known && !exp_c && mem_bound[c]) n_noncrit_known++;
            if (!known && mem_bound[c]) begin
              if (exp_c) n_unknown_crit++; else n_unknown_noncrit++;
            end
          end
        end
      end
      // ---- this cycle's events ----
      for (int c = 0; c < NC; c++) begin
        bit ds, cn, sv;
        if (mem_bound[c]) begin
          ds = ($urandom_range(0, 9) != 0);
          cn = ($urandom_range(0, 9) != 0);
        end else begin
          ds = ($urandom_range(0, 9) == 0);
          cn = ($urandom_range(0, 9) == 0);
        end
        sv = ds && ($urandom_range(0, 1) == 0);
        dispatch_stall[c] = ds;
        commit_none[c]    = cn;
        stall_valid[c]    = sv;
        if (sv) begin
          int i;
          i = pick_load();
          stall_pc[c] = pc_of(c, i);
          if (slot[c][i] < 0) begin slot[c][i] = nslots[c]; nslots[c]++; end
          cnt[c][i]++;
        end
      end
      llc_access = ($urandom_range(0, 3) != 0);
      llc_miss   = llc_access && (ncyc < 2 * INTERVAL ? ($urandom_range(0, 1) == 0)
                                                     : ($urandom_range(0, 19) != 0));
      @(negedge clk);
    end
    $display("mem-bound cores %0d; critical known loads %0d, non-critical known loads %0d, unknown critical %0d, unknown non-critical %0d",
             n_mem, n_crit, n_noncrit_known, n_unknown_crit, n_unknown_noncrit);
    check(n_crit > 0 && n_noncrit_known > 0 && n_unknown_crit > 0 && n_unknown_noncrit > 0,
          "top loads, minor loads, and both miss-rate cases were seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
