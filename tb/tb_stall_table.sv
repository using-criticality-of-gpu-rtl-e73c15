// tb_stall_table: random stall events from a pool of PCs larger than the
// table, so entries are replaced. A reference keeps last-use times for LRU
// and computes the top-90% set by sorting; every cycle the lookup of a
// random PC (hit and top flags) and the total are compared.
module tb_stall_table;
  localparam int E = 16;
  logic clk = 1'b0, rst_n = 1'b0, stall_valid = 1'b0;
  logic [31:0] stall_pc = '0, lookup_pc = '0;
  logic lookup_hit, lookup_top;
  logic [36:0] total_stall;
  int checks = 0, failures = 0, n_top = 0, n_hit_not_top = 0, n_evict = 0;

  bit          mv [E];
  logic [31:0] mpc [E];
  longint      mcnt [E];
  longint      mlast [E];

  stall_table dut (.clk, .rst_n, .stall_valid, .stall_pc, .lookup_pc, .lookup_hit, .lookup_top, .total_stall);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int find(logic [31:0] p);
    for (int i = 0; i < E; i++) if (mv[i] && mpc[i] == p) return i;
    return -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint now;
    for (int i = 0; i < E; i++) begin mv[i] = 0; mcnt[i] = 0; mlast[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    now = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int k, li;
      longint tot, ahead;
      // skewed PC popularity: a few hot PCs, many cold
      stall_valid = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 9) < 7) stall_pc = 32'h100 + 4 * $urandom_range(0, 3);
      else                          stall_pc = 32'h800 + 4 * $urandom_range(0, 29);
      lookup_pc = ($urandom_range(0, 1) == 1) ? 32'h100 + 4 * $urandom_range(0, 3)
                                              : 32'h800 + 4 * $urandom_range(0, 29);
      #1;
      // lookup before the update
      li = find(lookup_pc);
      tot = 0; ahead = 0;
      for (int i = 0; i < E; i++) if (mv[i]) tot += mcnt[i];
      if (li >= 0)
        for (int j = 0; j < E; j++)
          if (mv[j] && j != li && (mcnt[j] > mcnt[li] || (mcnt[j] == mcnt[li] && j < li))) ahead += mcnt[j];
      check(lookup_hit == (li >= 0), $sformatf("hit at %0d", cyc));
      check(lookup_top == (li >= 0 && ahead * 10 < tot * 9), $sformatf("top at %0d", cyc));
      check(total_stall == 37'(tot), "total");
      if (li >= 0 && (ahead * 10 < tot * 9)) n_top++;
      if (li >= 0 && !(ahead * 10 < tot * 9)) n_hit_not_top++;
      @(posedge clk);
      now++;
      if (stall_valid) begin
        k = find(stall_pc);
        if (k >= 0) begin
          mcnt[k]++;
        end else begin
          k = -1;
          for (int i = 0; i < E; i++) if (!mv[i] && k < 0) k = i;
          if (k < 0) begin
            k = 0;
            for (int i = 1; i < E; i++) if (mlast[i] < mlast[k]) k = i;
            n_evict++;
          end
          mv[k] = 1; mpc[k] = stall_pc; mcnt[k] = 1;
        end
        mlast[k] = now;
      end
      @(negedge clk);
    end
    check(n_top > 0 && n_hit_not_top > 0 && n_evict > 0, "top, non-top and eviction cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
