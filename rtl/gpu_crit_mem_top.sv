// gpu_crit_mem_top: GPU-access criticality estimation and criticality-aware
// DRAM scheduling for a CPU-GPU heterogeneous processor.
//
// The GPU, the CPU cores, the shared LLC and the DRAM devices are outside
// this block; their events arrive on ports. Inside:
//  * 3D rendering: pipeline_monitor watches the request flow of the 98 units
//    of the rendering queuing network (FE, 16 ZS, 64 SH, 16 CW, BT);
//    bottleneck_finder turns that into a bottleneck vector every
//    BNECK_PERIOD cycles; frame_rate_estimator projects the frame time from
//    the render-target update stream; stream_classifier_3d marks a GPU access
//    critical when its source unit is bottlenecked and the frame is projected
//    to miss the target.
//  * GPGPU: gpgpu_classifier marks shader LLC requests critical from per-core
//    stall monitors, per-core stall tables and the GPU LLC miss rate; the
//    non-critical ones bypass the LLC.
//  * DRAM: NCH channels, each a dram_scheduler with its own IM-SCHED
//    probability unit (im_sched_prob); one llc_interference_monitor (IM-LLC)
//    and one gpgpu_boost_detector serve all channels.
// `mode_gpgpu` selects which classifier drives `gpu_req_critical` (the GPU
// runs either a 3D or a GPGPU workload). The GPU request classification is
// combinational from `gpu_req_*` so the GPU can attach the bit to the LLC
// request it is sending; the LLC passes that bit to the memory controller
// with the miss (`mc_req[*].critical`). Defaults are the evaluated
// configuration's sizes (16 ROPs, 64 3D shader cores, 16 GPGPU shader
// cores, 4 CPU cores, 2 channels, 8-bit counters, 16-entry stall tables, a
// 64-entry RTP table); the periods and intervals the source leaves open are
// this design's choices.
module gpu_crit_mem_top
  import crit_pkg::*;
#(
  parameter int unsigned N_ROP         = 16,
  parameter int unsigned N_SH          = 64,
  parameter int unsigned N_GC          = 16,
  parameter int unsigned N_CPU         = 4,
  parameter int unsigned NCH           = 2,
  parameter int unsigned W             = 8,
  parameter int unsigned CNT_W         = 8,
  parameter int unsigned STALL_ENTRIES = 16,
  parameter int unsigned RTP_ENTRIES   = 64,
  parameter int unsigned NTILES        = 570,
  parameter longint unsigned TARGET_CYCLES = 64'd25_000_000,
  parameter int unsigned BNECK_PERIOD  = 1024,
  parameter int unsigned GPGPU_PERIOD  = 1024,
  parameter int unsigned MISS_INTERVAL = 65536,
  parameter int unsigned IM_INTERVAL   = 65536,
  parameter int unsigned LLC_INTERVAL  = 65536,
  parameter int unsigned BOOST_WINDOW  = 100000,
  parameter int unsigned PROBE_EVERY   = 10,
  parameter int unsigned QDEPTH        = 32,
  localparam int unsigned NU           = 2 + 2 * N_ROP + N_SH,
  localparam int unsigned TILE_W       = (NTILES > 1) ? $clog2(NTILES) : 1,
  localparam int unsigned GC_W         = (N_GC > 1) ? $clog2(N_GC) : 1,
  localparam int unsigned CPU_IDW      = (N_CPU > 1) ? $clog2(N_CPU) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               mode_gpgpu,
  input  logic               early_z,
  input  logic               policy_im,      // 1: IM policy, 0: GPU-favoring policy
  input  logic [CNT_W-1:0]   th_in  [NUM_UNIT_TYPES],
  input  logic [CNT_W-1:0]   th_out [NUM_UNIT_TYPES],
  // 3D pipeline request flow (FE, ZS[], SH[], CW[], BT)
  input  logic [CNT_W-1:0]   unit_pending   [NU],
  input  logic [CNT_W-1:0]   unit_completed [NU],
  // render-target updates
  input  logic               rt_upd_valid,
  input  logic [TILE_W-1:0]  rt_upd_tile,
  input  logic [TILE_W:0]    rt_num_tiles,   // render-target tiles at the current resolution
  input  logic               frame_end,
  // GPGPU shader core events
  input  logic [N_GC-1:0]    core_dispatch_stall,
  input  logic [N_GC-1:0]    core_commit_none,
  input  logic [N_GC-1:0]    core_stall_valid,
  input  logic [31:0]        core_stall_pc [N_GC],
  input  logic [7:0]         shader_retired,
  // GPU LLC lookups
  input  logic               gpu_llc_access,
  input  logic               gpu_llc_miss,
  // GPU request being sent to the LLC
  input  stream_e            gpu_req_stream,
  input  logic [GC_W-1:0]    gpu_req_core,
  input  logic [31:0]        gpu_req_pc,
  output logic               gpu_req_critical,
  output logic               gpu_req_bypass,
  // CPU LLC lookups
  input  logic               cpu_llc_access,
  input  logic [CPU_IDW-1:0] cpu_llc_id,
  input  logic               cpu_llc_miss,
  // memory controllers
  input  logic [NCH-1:0]     mc_req_valid,
  input  mem_req_t           mc_req [NCH],
  output logic [NCH-1:0]     mc_req_ready,
  output logic [NCH-1:0]     dram_cmd_valid,
  output dram_cmd_t          dram_cmd [NCH],
  // status
  output bneck_t             bneck,
  output logic               fps_learning,
  output logic               fps_pred_valid,
  output logic               fps_below_target,
  output logic [63:0]        est_frame_cycles,
  output logic [N_GC-1:0]    core_bottleneck,
  output logic [N_CPU-1:0]   emergency,
  output logic               gpu_boost,
  output logic [15:0]        cpu_prob_q16 [NCH],
  output logic [NCH-1:0]     ev_cpu_over_crit,
  output logic [NCH-1:0]     ev_emerg_served,
  output logic [NCH-1:0]     ev_crit_served
);
  // ---------------- 3D rendering criticality ----------------
  unit_stat_t stat [NUM_UNIT_TYPES];
  logic       bneck_update;

  pipeline_monitor #(.W(W), .N_ROP(N_ROP), .N_SH(N_SH), .CNT_W(CNT_W)) u_pmon (
    .clk, .rst_n, .clear(1'b0),
    .pending(unit_pending), .completed(unit_completed),
    .th_in, .th_out, .stat
  );

  bottleneck_finder #(.PERIOD(BNECK_PERIOD)) u_bnf (
    .clk, .rst_n, .early_z, .stat, .bneck, .update(bneck_update)
  );

  logic fps_relearn;
  frame_rate_estimator #(.NTILES(NTILES), .ENTRIES(RTP_ENTRIES), .TARGET_CYCLES(TARGET_CYCLES)) u_fre (
    .clk, .rst_n,
    .upd_valid(rt_upd_valid), .upd_tile(rt_upd_tile), .num_tiles(rt_num_tiles), .frame_end,
    .learning(fps_learning), .pred_valid(fps_pred_valid),
    .est_frame_cycles, .below_target(fps_below_target), .relearn_event(fps_relearn)
  );

  logic crit_3d;
  stream_classifier_3d u_sc3d (
    .bneck, .below_target(fps_below_target), .stream(gpu_req_stream), .critical(crit_3d)
  );

  // ---------------- GPGPU criticality ----------------
  logic crit_gp, bypass_gp;
  gpgpu_classifier #(
    .N_CORES(N_GC), .W(W), .ENTRIES(STALL_ENTRIES), .PC_W(32),
    .PERIOD(GPGPU_PERIOD), .MISS_INTERVAL(MISS_INTERVAL)
  ) u_gpc (
    .clk, .rst_n,
    .dispatch_stall(core_dispatch_stall), .commit_none(core_commit_none),
    .stall_valid(core_stall_valid), .stall_pc(core_stall_pc),
    .llc_access(gpu_llc_access), .llc_miss(gpu_llc_miss),
    .req_core(gpu_req_core), .req_pc(gpu_req_pc),
    .req_critical(crit_gp), .req_bypass(bypass_gp), .core_bottleneck
  );

  assign gpu_req_critical = mode_gpgpu ? crit_gp : crit_3d;
  assign gpu_req_bypass   = mode_gpgpu && bypass_gp;

  // ---------------- shared DRAM policy state ----------------
  intensity_e cls [N_CPU];
  logic       im_llc_active, llc_iv_end, boost_win_end;

  llc_interference_monitor #(.N_CPU(N_CPU), .INTERVAL(LLC_INTERVAL)) u_llcim (
    .clk, .rst_n,
    .acc_valid(cpu_llc_access), .acc_cpu(cpu_llc_id), .acc_miss(cpu_llc_miss),
    .cls, .emergency, .active(im_llc_active), .interval_end(llc_iv_end)
  );

  gpgpu_boost_detector #(.WINDOW(BOOST_WINDOW), .PROBE_EVERY(PROBE_EVERY)) u_boost (
    .clk, .rst_n, .enable(mode_gpgpu), .retired(shader_retired),
    .boost(gpu_boost), .window_end(boost_win_end)
  );

  // ---------------- memory controllers ----------------
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic cpu_served, cpu_deprio, crit_served, cpu_over_crit, emerg_served, iv_end;
    logic [$clog2(QDEPTH + 1)-1:0] occ;

    dram_scheduler #(
      .QDEPTH(QDEPTH), .N_CPU(N_CPU), .SEED(16'hACE1 + 16'(c) * 16'h1F3)
    ) u_sched (
      .clk, .rst_n,
      .req_valid(mc_req_valid[c]), .req(mc_req[c]), .req_ready(mc_req_ready[c]),
      .cmd_valid(dram_cmd_valid[c]), .cmd(dram_cmd[c]),
      .policy_im, .cpu_prob_q16(cpu_prob_q16[c]), .im_llc_active, .emergency,
      .gpu_boost,
      .cpu_served, .cpu_deprio, .crit_served, .cpu_over_crit, .emerg_served,
      .occupancy(occ)
    );

    im_sched_prob #(.INTERVAL(IM_INTERVAL)) u_prob (
      .clk, .rst_n, .cpu_served, .cpu_deprio,
      .prob_q16(cpu_prob_q16[c]), .interval_end(iv_end)
    );

    assign ev_cpu_over_crit[c] = cpu_over_crit;
    assign ev_emerg_served[c]  = emerg_served;
    assign ev_crit_served[c]   = crit_served;
  end
endmodule
