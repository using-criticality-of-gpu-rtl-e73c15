// tb_dram_scheduler: random CPU and GPU requests (critical and not) over
// two banks' worth of hot rows plus random ones, in four policy phases:
// GPU-favoring, IM with an emergency CPU application, IM with a 50% CPU
// prioritisation probability, and all-GPU boost. The bench keeps its own
// copy of the queue in arrival order, of the open rows and of the bank and
// bus timing, and checks every cycle that
//   * a request is issued whenever one is eligible, and only then;
//   * the issued request was eligible, its activate/precharge flags match
//     the open-row state, and no eligible request had a higher
//     {row hit, level} key or the same key and an earlier arrival
//     (under the 50% phase either outcome of the random draw is accepted);
//   * the passed-over flag reported with a CPU request is right;
//   * every accepted request leaves exactly once.
module tb_dram_scheduler;
  import crit_pkg::*;
  localparam int Q = 32, NB = 8, TB = 4, TRCD = 14, TRP = 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready, cmd_valid;
  mem_req_t req;
  dram_cmd_t cmd;
  logic policy_im = 1'b0, im_llc_active = 1'b0, gpu_boost = 1'b0;
  logic [15:0] cpu_prob_q16 = '0;
  logic [3:0] emergency = '0;
  logic cpu_served, cpu_deprio, crit_served, cpu_over_crit, emerg_served;
  logic [5:0] occupancy;
  int checks = 0, failures = 0;
  int n_hit = 0, n_conf = 0, n_crit = 0, n_dep = 0, n_emerg = 0, n_over = 0, n_boostg = 0, n_issued = 0, n_acc = 0;

  dram_scheduler dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .cmd_valid, .cmd,
    .policy_im, .cpu_prob_q16, .im_llc_active, .emergency, .gpu_boost,
    .cpu_served, .cpu_deprio, .crit_served, .cpu_over_crit, .emerg_served, .occupancy);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bench model
  mem_req_t mq [$];
  bit       mdep [$];
  bit       open_v [NB];
  logic [15:0] open_row [NB];
  longint   bank_ok [NB];
  longint   bus_ok;
  longint   t;            // index of the posedge just past

  function automatic int lvl(mem_req_t r, bit coin);
    if (r.is_gpu) return (gpu_boost || r.critical) ? 2 : 0;
    if (coin) return 3;
    if (policy_im && im_llc_active && emergency[r.cpu_id]) return 2;
    return 1;
  endfunction

  function automatic bit elig(mem_req_t r);
    return bank_ok[r.bank] <= t && bus_ok <= t;
  endfunction

  function automatic int key(mem_req_t r, bit coin);
    bit hit;
    hit = open_v[r.bank] && open_row[r.bank] == r.row;
    return (int'(hit) << 2) | lvl(r, coin);
  endfunction

  function automatic bit optimal(int s, bit coin);
    int ks;
    ks = key(mq[s], coin);
    for (int j = 0; j < mq.size(); j++)
      if (j != s && elig(mq[j])) begin
        if (key(mq[j], coin) > ks) return 0;
        if (key(mq[j], coin) == ks && j < s) return 0;
      end
    return 1;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] next_tag;
    bit accepted;
    mem_req_t pending_req;
    next_tag = 0;
    for (int b = 0; b < NB; b++) begin open_v[b] = 0; open_row[b] = 0; bank_ok[b] = 0; end
    bus_ok = 0;
    t = 0;
    req = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 40000; c++) begin
      int phase;
      phase = c / 10000;
      policy_im     = (phase == 1 || phase == 2);
      im_llc_active = (phase == 1);
      emergency     = (phase == 1) ? 4'b0010 : 4'b0000;
      cpu_prob_q16  = (phase == 2) ? 16'h8000 : 16'h0000;
      gpu_boost     = (phase == 3);
      // drive a request (bursty so that the queue fills at times)
      req_valid = ((c / 300) % 2 == 0) ? ($urandom_range(0, 9) < 6) : ($urandom_range(0, 9) < 1);
      req.is_gpu   = $urandom_range(0, 1);
      req.critical = req.is_gpu && ($urandom_range(0, 2) == 0);
      req.cpu_id   = 2'($urandom_range(0, 3));
      req.bank     = 3'($urandom_range(0, 3));
      req.row      = ($urandom_range(0, 3) != 0) ? 16'(req.bank) : 16'($urandom_range(100, 103));
      req.col      = 10'($urandom_range(0, 1023));
      req.tag      = next_tag;
      accepted     = req_valid && req_ready;
      pending_req  = req;
      @(posedge clk);
      t++;
      @(negedge clk);
      // ---- decision taken at posedge t ----
      begin
        int s;
        bit any_elig;
        any_elig = 0;
        for (int j = 0; j < mq.size(); j++) if (elig(mq[j])) any_elig = 1;
        check(cmd_valid == any_elig, $sformatf("cycle %0d: issue=%0d eligible=%0d", c, cmd_valid, any_elig));
        if (cmd_valid) begin
          s = -1;
          for (int j = mq.size() - 1; j >= 0; j--) if (mq[j].tag == cmd.tag) s = j;
          check(s >= 0, "issued request is in the queue");
          if (s >= 0) begin
            bit hit, c0, c1;
            mem_req_t r;
            r   = mq[s];
            hit = open_v[r.bank] && open_row[r.bank] == r.row;
            check(elig(r), "issued request was eligible");
            check(cmd.bank == r.bank && cmd.row == r.row && cmd.col == r.col, "command fields");
            check(cmd.activate == !hit && cmd.precharge == (open_v[r.bank] && !hit), "activate/precharge");
            c0 = optimal(s, 1'b0);
            c1 = (phase == 2) ? optimal(s, 1'b1) : 1'b0;
            check(c0 || c1, $sformatf("cycle %0d: not the best choice (slot %0d)", c, s));
            if (!c0 && c1) n_over++;
            if (hit) n_hit++; else if (open_v[r.bank]) n_conf++;
            // critical GPU issue: older CPU entries were passed over
            check(crit_served == (r.is_gpu && r.critical), "crit_served");
            if (r.is_gpu && r.critical) begin
              n_crit++;
              for (int j = 0; j < s; j++) if (!mq[j].is_gpu) mdep[j] = 1;
            end
            check(cpu_served == !r.is_gpu, "cpu_served");
            if (!r.is_gpu) begin
              check(cpu_deprio == mdep[s], "passed-over flag");
              if (mdep[s]) n_dep++;
              check(emerg_served == (policy_im && im_llc_active && emergency[r.cpu_id]), "emerg_served");
              if (emerg_served) n_emerg++;
            end
            if (gpu_boost && r.is_gpu && !r.critical) n_boostg++;
            // timing
            bank_ok[r.bank] = t + (hit ? TB : open_v[r.bank] ? TRP + TRCD + TB : TRCD + TB);
            bus_ok          = t + TB;
            open_v[r.bank]  = 1;
            open_row[r.bank] = r.row;
            mq.delete(s);
            mdep.delete(s);
            n_issued++;
          end
        end
      end
      if (accepted) begin
        mq.push_back(pending_req);
        mdep.push_back(1'b0);
        next_tag++;
        n_acc++;
      end
      check(int'(occupancy) == mq.size(), "occupancy");
      check(req_ready == (mq.size() < Q), "ready");
    end
    // drain
    req_valid = 1'b0;
    repeat (2000) @(negedge clk);
    check(occupancy == 0, "queue drained");
    check(n_hit > 0 && n_conf > 0 && n_crit > 0 && n_dep > 0 && n_emerg > 0 && n_over > 0 && n_boostg > 0,
          $sformatf("mechanisms hit=%0d conflict=%0d crit=%0d deprio=%0d emerg=%0d cpu_over=%0d boost=%0d",
                    n_hit, n_conf, n_crit, n_dep, n_emerg, n_over, n_boostg));
    $display("issued %0d accepted %0d", n_issued, n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
