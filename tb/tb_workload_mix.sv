// tb_workload_mix: one DRAM channel at its default size (32-entry queue,
// 8 banks, 14-14-14 timing, IM-SCHED probability over 65536-cycle
// intervals) with the LLC interference monitor (4 applications, 65536-cycle
// intervals) under a heterogeneous mix: four CPU applications, two with high
// and two with low LLC miss intensity, with random rows; and a GPU stream
// with strong row locality of which 30 % of the requests are critical.
//
// The CPU applications take turns at one LLC lookup slot per cycle; a miss
// becomes a DRAM request. Applications 0 and 1 miss 80 % of their lookups
// (H). Application 2 misses 5 % (L). Application 3 misses 5 % in the first
// interval and then 20 % (M), as if GPU blocks were evicting its data; while
// IM-LLC serves it in emergency mode it is back at 5 %.
//
// The same traffic model is run twice from reset: with the GPU-favoring
// policy and with the IM policy. Generated requests wait in a queue in front
// of the controller and enter it in order when it has room. The time from
// entering the controller's queue to issue is measured here for CPU,
// critical GPU and non-critical GPU requests, after the first probability
// interval. The checks are the qualitative behaviour the policies are built
// for:
//  * every accepted request is issued exactly once (after a drain);
//  * GPU-favoring: critical GPU requests wait less than CPU requests, and
//    CPU requests less than non-critical GPU requests; a CPU request is
//    never issued ahead of a waiting critical GPU request by the coin;
//  * IM: the CPU prioritisation probability becomes non-zero and stays at
//    or below one half; the coin does put CPU requests ahead of waiting
//    critical GPU requests; critical GPU requests wait no less than under
//    GPU-favoring, and CPU requests no more (within 2 %);
//  * IM-LLC: only application 3 enters emergency mode, in both runs. Under
//    GPU-favoring nothing is served as emergency and, still in M, it leaves
//    emergency mode after one interval. Under IM its requests are served as
//    emergency requests, it stays in emergency mode, and they wait less than
//    those of application 2, which issues at a similar rate.
// Mean waits are kept in hundredths of a cycle.
module tb_workload_mix;
  import crit_pkg::*;
  localparam int PHASE = 200_000, WARM = 70_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready, cmd_valid, policy_im = 1'b0;
  mem_req_t req = '0;
  dram_cmd_t cmd;
  logic [15:0] prob;
  logic cpu_served, cpu_deprio, crit_served, cpu_over_crit, emerg_served, iv_end;
  logic [5:0] occupancy;
  logic acc_valid = 1'b0, acc_miss = 1'b0, llc_active, llc_iv_end;
  logic [1:0] acc_cpu = '0;
  logic [3:0] emergency;
  intensity_e app_cls [4];
  int checks = 0, failures = 0;

  dram_scheduler dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .cmd_valid, .cmd,
    .policy_im, .cpu_prob_q16(prob), .im_llc_active(llc_active), .emergency, .gpu_boost(1'b0),
    .cpu_served, .cpu_deprio, .crit_served, .cpu_over_crit, .emerg_served, .occupancy
  );
  llc_interference_monitor u_llc (
    .clk, .rst_n, .acc_valid, .acc_cpu, .acc_miss, .cls(app_cls), .emergency, .active(llc_active),
    .interval_end(llc_iv_end));
  im_sched_prob u_prob (.clk, .rst_n, .cpu_served, .cpu_deprio, .prob_q16(prob), .interval_end(iv_end));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2 * PHASE + 100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint now = 0;
  always @(posedge clk) now <= now + 1;

  // per-tag bookkeeping
  longint born [256];
  bit     busy [256];
  int     cls  [256];          // 0 CPU, 1 critical GPU, 2 non-critical GPU
  int     app  [256];          // CPU application
  bit     in_emerg [256];      // accepted while application 3 was in emergency mode
  longint lat_sum [2][3];
  longint lat_n   [2][3];
  int     phase = 0;
  longint t_phase = 0;
  int     dup = 0, issued = 0, accepted = 0;
  int     n_over [2] = '{0, 0};
  int     n_emerg [2] = '{0, 0};
  longint app_sum [4] = '{0, 0, 0, 0};   // IM run, while application 3 is in emergency mode
  longint app_n   [4] = '{0, 0, 0, 0};

  // issue monitor
  always @(posedge clk) begin
    if (rst_n && cmd_valid) begin
      if (!busy[cmd.tag]) dup++;
      busy[cmd.tag] = 1'b0;
      issued++;
      if (cpu_over_crit) n_over[phase]++;
      if (emerg_served) n_emerg[phase]++;
      if (phase == 1 && cls[cmd.tag] == 0 && in_emerg[cmd.tag]) begin
        app_sum[app[cmd.tag]] += now - born[cmd.tag];
        app_n[app[cmd.tag]]++;
      end
      if (born[cmd.tag] >= t_phase + WARM) begin
        lat_sum[phase][cls[cmd.tag]] += now - born[cmd.tag];
        lat_n[phase][cls[cmd.tag]]++;
      end
    end
  end

  typedef struct {
    mem_req_t r;
    longint   t;
    int       c;
    int       a;
  } gen_t;
  gen_t pend [$];

  function automatic mem_req_t gen_cpu(int id);
    mem_req_t r;
    r        = '0;
    r.cpu_id = 2'(id);
    r.bank   = 3'($urandom_range(0, 7));
    r.row    = 16'($urandom_range(0, 16383));
    r.col    = 10'($urandom_range(0, 1023));
    return r;
  endfunction

  function automatic mem_req_t gen_gpu(bit crit);
    mem_req_t r;
    r          = '0;
    r.is_gpu   = 1'b1;
    r.critical = crit;
    r.bank     = 3'($urandom_range(0, 7));
    r.row      = 16'h8000 + 16'($urandom_range(0, 3));
    r.col      = 10'($urandom_range(0, 1023));
    return r;
  endfunction

  task automatic run_phase(int p, bit im, int cycles, bit generate_traffic);
    int tag_next;
    tag_next = 0;
    for (int c = 0; c < cycles; c++) begin
      // traffic generation
      acc_valid = 1'b0;
      acc_miss  = 1'b0;
      if (generate_traffic && pend.size() < 400) begin
        int a, q, m;
        a = c % 4;                                     // lookup slot of this cycle
        q = (a < 2) ? 125 : 333;                       // lookups per 1000 slots
        if (a < 2)                                                        m = 800;
        else if (a == 2 || now - t_phase < 65536 || (im && emergency[3])) m = 50;
        else                                                              m = 200;
        if ($urandom_range(0, 999) < q) begin
          acc_valid = 1'b1;
          acc_cpu   = 2'(a);
          acc_miss  = ($urandom_range(0, 999) < m);
          if (acc_miss) pend.push_back('{gen_cpu(a), now, 0, a});
        end
        if ($urandom_range(0, 9) == 0) begin
          bit crit;
          crit = ($urandom_range(0, 9) < 3);
          pend.push_back('{gen_gpu(crit), now, crit ? 1 : 2, 0});
        end
      end
      // offer the oldest pending request (with a free tag)
      req_valid = 1'b0;
      if (pend.size() != 0 && req_ready) begin
        int t;
        t = -1;
        for (int k = 0; k < 256; k++) if (!busy[(tag_next + k) % 256]) begin t = (tag_next + k) % 256; break; end
        if (t >= 0) begin
          gen_t g;
          g = pend.pop_front();
          req       = g.r;
          req.tag   = 8'(t);
          req_valid = 1'b1;
          busy[t]   = 1'b1;
          born[t]   = now;
          cls[t]    = g.c;
          app[t]    = g.a;
          in_emerg[t] = emergency[3];
          tag_next  = (t + 1) % 256;
          accepted++;
        end
      end
      @(negedge clk);
    end
    req_valid = 1'b0;
    acc_valid = 1'b0;
  endtask

  initial begin
    longint cpu_a, cpu_b, crit_a, crit_b, nc_a;
    bit prob_seen, prob_capped;
    bit em_entered [2], em_other [2], em_end [2];
    for (int t = 0; t < 256; t++) begin busy[t] = 0; born[t] = 0; cls[t] = 0; app[t] = 0; in_emerg[t] = 0; end
    for (int p = 0; p < 2; p++) for (int k = 0; k < 3; k++) begin lat_sum[p][k] = 0; lat_n[p][k] = 0; end
    prob_seen = 0;
    prob_capped = 1;
    for (int p = 0; p < 2; p++) begin
      rst_n = 1'b0;
      policy_im = (p == 1);
      pend.delete();
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      phase = p;
      em_entered[p] = 0;
      em_other[p] = 0;
      t_phase = now;
      fork
        run_phase(p, p == 1, PHASE, 1'b1);
        forever begin
          @(posedge clk);
          if (prob != 0) prob_seen = (p == 1);
          if (prob > 16'h8000) prob_capped = 0;
          if (emergency[3]) em_entered[p] = 1;
          if (emergency[2:0] != 0) em_other[p] = 1;
        end
      join_any
      disable fork;
      em_end[p] = emergency[3];
      // drain
      begin
        int guard;
        guard = 0;
        while ((pend.size() != 0 || occupancy != 0) && guard < 50_000) begin
          run_phase(p, p == 1, 1, 1'b0);
          guard++;
        end
      end
      repeat (40) @(negedge clk);
      check(pend.size() == 0 && occupancy == 0, $sformatf("phase %0d drained", p));
    end
    check(dup == 0, $sformatf("%0d requests issued twice", dup));
    check(issued == accepted, $sformatf("issued %0d of %0d accepted", issued, accepted));
    cpu_a  = 100 * lat_sum[0][0] / lat_n[0][0];
    crit_a = 100 * lat_sum[0][1] / lat_n[0][1];
    nc_a   = 100 * lat_sum[0][2] / lat_n[0][2];
    cpu_b  = 100 * lat_sum[1][0] / lat_n[1][0];
    crit_b = 100 * lat_sum[1][1] / lat_n[1][1];
    $display("GPU-favoring: mean queue wait CPU %0d, critical GPU %0d, non-critical GPU %0d cycles (%0d/%0d/%0d requests)",
             cpu_a, crit_a, nc_a, lat_n[0][0], lat_n[0][1], lat_n[0][2]);
    $display("IM:           mean queue wait CPU %0d, critical GPU %0d, non-critical GPU %0d cycles; last probability 0x%h",
             cpu_b, crit_b, 100 * lat_sum[1][2] / lat_n[1][2], prob);
    $display("CPU issued ahead of a waiting critical GPU request: %0d (GPU-favoring), %0d (IM)", n_over[0], n_over[1]);
    check(crit_a < cpu_a && cpu_a < nc_a, "GPU-favoring: critical GPU < CPU < non-critical GPU");
    check(prob_seen && prob_capped, "IM: probability non-zero and capped at one half");
    check(n_over[0] == 0 && n_over[1] > 0, "coin decisions only under IM");
    check(cpu_b * 100 <= cpu_a * 102, "IM: CPU requests wait no more than under GPU-favoring");
    check(crit_b >= crit_a, "IM: critical GPU requests wait no less than under GPU-favoring");
    $display("IM-LLC: emergency entered %0d/%0d, held at end %0d/%0d, emergency services %0d/%0d (GPU-favoring/IM)",
             em_entered[0], em_entered[1], em_end[0], em_end[1], n_emerg[0], n_emerg[1]);
    $display("IM, application 3 in emergency mode: mean queue wait application 2 %0d, application 3 %0d (%0d/%0d requests)",
             app_n[2] ? 100 * app_sum[2] / app_n[2] : 0, app_n[3] ? 100 * app_sum[3] / app_n[3] : 0, app_n[2], app_n[3]);
    check(em_entered[0] && em_entered[1] && !em_other[0] && !em_other[1], "only application 3 enters emergency mode");
    check(n_emerg[0] == 0 && !em_end[0], "GPU-favoring: no emergency service, application 3 leaves emergency mode");
    check(n_emerg[1] > 0 && em_end[1], "IM: emergency service, application 3 stays in emergency mode");
    check(app_n[2] > 50 && app_n[3] > 50 && app_sum[3] * app_n[2] < app_sum[2] * app_n[3],
          "IM: application 3 in emergency mode waits less than application 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
