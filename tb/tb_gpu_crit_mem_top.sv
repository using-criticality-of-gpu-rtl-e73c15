// tb_gpu_crit_mem_top: end-to-end run of the whole criticality and DRAM
// scheduling block at reduced sizes (2 ROPs, 4 3D shader cores, 4 GPGPU
// cores, 4 render-target tiles, 4-entry RTP table, 8-entry queues, short
// periods and intervals).
//  1. 3D workload: a learning frame, then prediction frames. While the frame
//     is projected to miss the target, the unit request-flow patterns are
//     set to make SH, ZS (early- and late-Z), FE, CW and BT the bottleneck in
//     turn, and the criticality of a request of every stream is checked.
//     A fast frame brings the projection under the target (nothing is
//     critical then), and a frame with a different RTP count causes
//     relearning.
//  2. DRAM: CPU and GPU requests with their criticality bits go to both
//     channels under the IM policy, with one CPU application pushed into
//     LLC-interference emergency mode. Every accepted request must come out
//     exactly once; queue back-pressure, critical service, passed-over CPU
//     requests, a non-zero CPU prioritisation probability, CPU-over-critical
//     decisions and emergency service must all be seen.
//  3. GPGPU workload: a bottlenecked core's top stall PC is critical and not
//     bypassed, a free core's request bypasses, and the all-GPU boost turns
//     on and off with the retired-instruction rate.
// Each mechanism that never happened counts as a failure.
module tb_gpu_crit_mem_top;
  import crit_pkg::*;
  localparam int N_ROP = 2, N_SH = 4, N_GC = 4, N_CPU = 4, NCH = 2, NT = 4, QD = 8;
  localparam int NU = 2 + 2 * N_ROP + N_SH;
  localparam longint TARGET = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mode_gpgpu = 1'b0, early_z = 1'b1, policy_im = 1'b1;
  logic [7:0] th_in [NUM_UNIT_TYPES], th_out [NUM_UNIT_TYPES];
  logic [7:0] unit_pending [NU], unit_completed [NU];
  logic rt_upd_valid = 1'b0, frame_end = 1'b0;
  logic [1:0] rt_upd_tile = '0;
  logic [2:0] rt_num_tiles = 3'(NT);
  logic [N_GC-1:0] core_dispatch_stall = '0, core_commit_none = '0, core_stall_valid = '0;
  logic [31:0] core_stall_pc [N_GC];
  logic [7:0] shader_retired = '0;
  logic gpu_llc_access = 1'b0, gpu_llc_miss = 1'b0;
  stream_e gpu_req_stream = S_COLOR;
  logic [1:0] gpu_req_core = '0;
  logic [31:0] gpu_req_pc = '0;
  logic gpu_req_critical, gpu_req_bypass;
  logic cpu_llc_access = 1'b0, cpu_llc_miss = 1'b0;
  logic [1:0] cpu_llc_id = '0;
  logic [NCH-1:0] mc_req_valid = '0, mc_req_ready, dram_cmd_valid;
  mem_req_t mc_req [NCH];
  dram_cmd_t dram_cmd [NCH];
  bneck_t bneck;
  logic fps_learning, fps_pred_valid, fps_below_target;
  logic [63:0] est_frame_cycles;
  logic [N_GC-1:0] core_bottleneck;
  logic [N_CPU-1:0] emergency;
  logic gpu_boost;
  logic [15:0] cpu_prob_q16 [NCH];
  logic [NCH-1:0] ev_cpu_over_crit, ev_emerg_served, ev_crit_served;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_bn [5];
  int m_early = 0, m_late = 0, m_crit3d = 0, m_noncrit_fast = 0, m_relearn = 0, m_below = 0, m_meets = 0;
  int m_backpressure = 0, m_crit_served = 0, m_over = 0, m_emerg = 0, m_prob = 0, m_rowhit = 0, m_conflict = 0;
  int m_gp_crit = 0, m_gp_bypass = 0, m_boost_on = 0, m_boost_off = 0;

  gpu_crit_mem_top #(
    .N_ROP(N_ROP), .N_SH(N_SH), .N_GC(N_GC), .N_CPU(N_CPU), .NCH(NCH),
    .STALL_ENTRIES(8), .RTP_ENTRIES(4), .NTILES(NT), .TARGET_CYCLES(TARGET),
    .BNECK_PERIOD(16), .GPGPU_PERIOD(16), .MISS_INTERVAL(64), .IM_INTERVAL(256),
    .LLC_INTERVAL(200), .BOOST_WINDOW(100), .PROBE_EVERY(2), .QDEPTH(QD)
  ) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ 3D helpers
  // Set every instance of each unit type to high/low arrival and completion.
  task automatic units(bit fe_i, bit fe_o, bit zs_i, bit zs_o, bit sh_i, bit sh_o,
                       bit cw_i, bit cw_o, bit bt_i, bit bt_o);
    for (int i = 0; i < NU; i++) begin
      bit hi, ho;
      if (i == 0)                      begin hi = fe_i; ho = fe_o; end
      else if (i <= N_ROP)             begin hi = zs_i; ho = zs_o; end
      else if (i <= N_ROP + N_SH)      begin hi = sh_i; ho = sh_o; end
      else if (i <= 2 * N_ROP + N_SH)  begin hi = cw_i; ho = cw_o; end
      else                             begin hi = bt_i; ho = bt_o; end
      unit_pending[i]   = hi ? 8'd9 : 8'd0;
      unit_completed[i] = ho ? 8'd5 : 8'd0;
    end
    repeat (300) @(negedge clk);
  endtask

  task automatic expect_bneck(bneck_t e, string what);
    check(bneck == e, $sformatf("%s: bottleneck %b want %b", what, bneck, e));
    if (bneck.fe) m_bn[0]++;
    if (bneck.zs) m_bn[1]++;
    if (bneck.sh) m_bn[2]++;
    if (bneck.cw) m_bn[3]++;
    if (bneck.bt) m_bn[4]++;
  endtask

  task automatic stream_crit(stream_e s, bit e, string what);
    gpu_req_stream = s;
    #1;
    check(gpu_req_critical == e, $sformatf("%s: stream %0d critical=%0d want %0d", what, s, gpu_req_critical, e));
    if (gpu_req_critical) m_crit3d++;
  endtask

  task automatic rtp(int gap);
    for (int i = 0; i < NT; i++) begin
      rt_upd_valid = 1'b1;
      rt_upd_tile  = 2'(i);
      @(negedge clk);
      rt_upd_valid = 1'b0;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic end_frame();
    frame_end = 1'b1;
    @(negedge clk);
    frame_end = 1'b0;
  endtask

  // ------------------------------------------------------------ DRAM side
  int sent [NCH][$];
  int got  [NCH][$];

  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      if (dram_cmd_valid[c]) begin
        got[c].push_back(int'(dram_cmd[c].tag));
        if (!dram_cmd[c].activate) m_rowhit++;
        if (dram_cmd[c].precharge) m_conflict++;
      end
      if (ev_crit_served[c])   m_crit_served++;
      if (ev_cpu_over_crit[c]) m_over++;
      if (ev_emerg_served[c])  m_emerg++;
      if (cpu_prob_q16[c] != 0) m_prob++;
    end
  end

  // ------------------------------------------------------------ sequence
  initial begin
    for (int t = 0; t < NUM_UNIT_TYPES; t++) begin th_in[t] = 8'd4; th_out[t] = 8'd2; end
    for (int i = 0; i < NU; i++) begin unit_pending[i] = '0; unit_completed[i] = '0; end
    for (int c = 0; c < N_GC; c++) core_stall_pc[c] = '0;
    for (int c = 0; c < NCH; c++) mc_req[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ===== 1. 3D rendering =====
    check(fps_learning, "learning after reset");
    for (int k = 0; k < 3; k++) rtp(20);        // learning frame: ~80 cycles per RTP
    end_frame();
    @(negedge clk);
    check(!fps_learning, "prediction after the learning frame");
    rtp(20);                                    // frame 2, first RTP (same pace)
    // SH bottleneck, early-Z
    early_z = 1'b1;
    units(0,0, 0,0, 1,0, 0,0, 0,0);
    check(fps_pred_valid && fps_below_target, $sformatf("slow frame projected above target (F=%0d)", est_frame_cycles));
    if (fps_below_target) m_below++;
    expect_bneck(5'b00100, "SH");
    stream_crit(S_TEXTURE, 1, "SH bottleneck");
    stream_crit(S_SHADER, 1, "SH bottleneck");
    stream_crit(S_COLOR, 0, "SH bottleneck");
    stream_crit(S_DEPTH, 0, "SH bottleneck");
    m_early++;
    // ZS bottleneck, early-Z (shaders underloaded)
    units(0,0, 1,0, 0,0, 0,0, 0,0);
    expect_bneck(5'b00010, "ZS early");
    stream_crit(S_DEPTH, 1, "ZS bottleneck");
    stream_crit(S_TEXTURE, 0, "ZS bottleneck");
    // FE bottleneck: ZS, SH underloaded
    units(1,0, 0,0, 0,0, 0,0, 0,0);
    expect_bneck(5'b00111, "FE");
    stream_crit(S_OTHER, 1, "FE bottleneck");
    stream_crit(S_BLITTER, 0, "FE bottleneck");
    // CW bottleneck
    units(0,0, 0,0, 0,0, 1,0, 0,0);
    expect_bneck(5'b01000, "CW");
    stream_crit(S_COLOR, 1, "CW bottleneck");
    // BT bottleneck
    units(0,0, 0,0, 0,0, 0,0, 1,0);
    expect_bneck(5'b10000, "BT");
    stream_crit(S_BLITTER, 1, "BT bottleneck");
    // late-Z: ZS sits between SH and CW
    early_z = 1'b0;
    units(0,0, 1,0, 1,0, 0,0, 0,0);
    expect_bneck(5'b00010, "ZS late");
    stream_crit(S_DEPTH, 1, "late-Z ZS bottleneck");
    m_late++;
    early_z = 1'b1;
    // finish frame 2 at the learned pace
    rtp(20);
    rtp(20);
    end_frame();
    // frame 3: fast
    for (int k = 0; k < 3; k++) rtp(0);
    units(0,0, 0,0, 1,0, 0,0, 0,0);
    check(!fps_learning && fps_pred_valid && !fps_below_target,
          $sformatf("fast frame meets the target (F=%0d)", est_frame_cycles));
    if (!fps_below_target) m_meets++;
    stream_crit(S_TEXTURE, 0, "SH bottleneck but target met");
    if (!gpu_req_critical && bneck.sh) m_noncrit_fast++;
    end_frame();
    // frame 4: one RTP only -> relearn
    rtp(0);
    end_frame();
    @(negedge clk);
    check(fps_learning, "relearning after a mismatching frame");
    if (fps_learning) m_relearn++;
    units(0,0, 0,0, 0,0, 0,0, 0,0);

    // ===== 2. DRAM scheduling under the IM policy =====
    policy_im = 1'b1;
    // CPU 2: a single LLC lookup that misses (an H interval after L ones)
    // enters emergency mode; the following intervals without lookups are L,
    // which keeps it there.
    for (int c = 0; c < 200; c++) begin      // CPUs 0, 1, 3: low miss rate
      cpu_llc_access = (c % 4 != 2);
      cpu_llc_id     = 2'(c % 4);
      cpu_llc_miss   = 1'b0;
      @(negedge clk);
    end
    cpu_llc_access = 1'b1;
    cpu_llc_id     = 2'd2;
    cpu_llc_miss   = 1'b1;
    @(negedge clk);
    cpu_llc_access = 1'b0;
    cpu_llc_miss   = 1'b0;
    repeat (420) @(negedge clk);
    check(emergency == 4'b0100, $sformatf("emergency vector %b", emergency));
    begin
      int tag [NCH];
      tag = '{0, 0};
      for (int cyc = 0; cyc < 6000; cyc++) begin
        for (int c = 0; c < NCH; c++) begin
          // accepted at the coming posedge?
          if (mc_req_valid[c] && mc_req_ready[c]) begin
            sent[c].push_back(int'(mc_req[c].tag));
            tag[c]++;
          end
          if (mc_req_valid[c] && !mc_req_ready[c]) m_backpressure++;
        end
        @(posedge clk);
        @(negedge clk);
        for (int c = 0; c < NCH; c++) begin
          bit burst;
          burst = ((cyc / 400) % 2 == 0);
          mc_req_valid[c]    = burst ? 1'b1 : ($urandom_range(0, 9) < 2);
          mc_req[c].is_gpu   = ($urandom_range(0, 1) == 1);
          mc_req[c].critical = mc_req[c].is_gpu && ($urandom_range(0, 1) == 1);
          mc_req[c].cpu_id   = 2'($urandom_range(0, 3));
          mc_req[c].bank     = 3'($urandom_range(0, 7));
          mc_req[c].row      = 16'($urandom_range(0, 2));
          mc_req[c].col      = 10'($urandom_range(0, 1023));
          mc_req[c].tag      = 8'(tag[c]);
        end
      end
      mc_req_valid = '0;
      repeat (2000) @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        bit same;
        int tmp_s [$], tmp_g [$];
        tmp_s = sent[c];
        tmp_g = got[c];
        tmp_s.sort();
        tmp_g.sort();
        same = (tmp_s.size() == tmp_g.size());
        if (same) foreach (tmp_s[i]) if (tmp_s[i] != tmp_g[i]) same = 0;
        check(same, $sformatf("channel %0d: %0d sent, %0d issued", c, sent[c].size(), got[c].size()));
      end
    end

    // ===== 3. GPGPU =====
    mode_gpgpu = 1'b1;
    core_dispatch_stall = 4'b0001;
    core_commit_none    = 4'b0001;
    for (int i = 0; i < 50; i++) begin
      core_stall_valid = 4'b0001;
      core_stall_pc[0] = (i < 45) ? 32'h400 : 32'h480;
      gpu_llc_access   = 1'b1;
      gpu_llc_miss     = (i % 2 == 0);
      @(negedge clk);
    end
    core_stall_valid = '0;
    for (int i = 0; i < 150; i++) begin
      gpu_llc_access = 1'b1;
      gpu_llc_miss   = (i % 2 == 0);
      @(negedge clk);
    end
    gpu_llc_access = 1'b0;
    check(core_bottleneck == 4'b0001, $sformatf("core bottleneck %b", core_bottleneck));
    gpu_req_stream = S_SHADER;
    gpu_req_core   = 2'd0;
    gpu_req_pc     = 32'h400;
    #1;
    check(gpu_req_critical && !gpu_req_bypass, "top PC of bottlenecked core is critical");
    if (gpu_req_critical) m_gp_crit++;
    gpu_req_core = 2'd1;
    #1;
    check(!gpu_req_critical && gpu_req_bypass, "free core's request bypasses the LLC");
    if (gpu_req_bypass) m_gp_bypass++;
    // boost probing: the bench's GPU speeds up for two boosted windows
    begin
      int boosted_windows;
      boosted_windows = 0;
      for (int c = 0; c < 2000; c++) begin
        if (gpu_boost) begin
          m_boost_on++;
          shader_retired = (boosted_windows < 200) ? 8'(3 + boosted_windows / 100) : 8'd4;
          boosted_windows++;
        end else begin
          if (m_boost_on > 0) m_boost_off++;
          shader_retired = 8'd2;
        end
        @(negedge clk);
      end
    end

    // ===== mechanism coverage =====
    for (int k = 0; k < 5; k++) check(m_bn[k] > 0, $sformatf("bottleneck of unit type %0d never seen", k));
    check(m_early > 0 && m_late > 0, "early-Z and late-Z traversals");
    check(m_crit3d > 0 && m_noncrit_fast > 0, "3D critical / target met");
    check(m_below > 0 && m_meets > 0 && m_relearn > 0, "frame rate: below, meets, relearn");
    check(m_backpressure > 0, "queue back-pressure");
    check(m_crit_served > 0 && m_over > 0 && m_emerg > 0 && m_prob > 0,
          $sformatf("DRAM: crit=%0d cpu_over=%0d emerg=%0d prob=%0d", m_crit_served, m_over, m_emerg, m_prob));
    check(m_rowhit > 0 && m_conflict > 0, "row hits and row conflicts");
    check(m_gp_crit > 0 && m_gp_bypass > 0, "GPGPU critical and bypass");
    check(m_boost_on > 0 && m_boost_off > 0, "GPGPU boost on and off");
    $display("mechanisms: bn=%0d/%0d/%0d/%0d/%0d crit_served=%0d cpu_over=%0d emerg=%0d hits=%0d conflicts=%0d backpressure=%0d boost=%0d",
             m_bn[0], m_bn[1], m_bn[2], m_bn[3], m_bn[4], m_crit_served, m_over, m_emerg, m_rowhit, m_conflict, m_backpressure, m_boost_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
