// tb_gpu_crit_mem_top_full: the top at its default sizes (98 monitored
// pipeline units, 16 GPGPU cores with 16-entry stall tables, a 570-tile
// render-target tracker set to 1280x1024 in 64x64 tiles (320 tiles), a
// 64-entry RTP table, two 32-entry DRAM queues) taken through one complete
// operation of each kind:
//  * 3D: a learning frame and a predicted frame of two full render target
//    planes each; the shader array is made the bottleneck; the projected
//    frame time is far below the 40 frames/s budget, so a texture access is
//    not critical.
//  * GPGPU: core 5 becomes bottlenecked with one dominant stalling load;
//    that load's LLC request is marked critical, sent to channel 0 behind an
//    older CPU request to the same (busy) bank, and must be issued first.
module tb_gpu_crit_mem_top_full;
  import crit_pkg::*;
  localparam int NU = 98, NT = 320, N_GC = 16, NCH = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mode_gpgpu = 1'b0, early_z = 1'b1, policy_im = 1'b1;
  logic [7:0] th_in [NUM_UNIT_TYPES], th_out [NUM_UNIT_TYPES];
  logic [7:0] unit_pending [NU], unit_completed [NU];
  logic rt_upd_valid = 1'b0, frame_end = 1'b0;
  logic [9:0] rt_upd_tile = '0;
  logic [10:0] rt_num_tiles = 11'(NT);
  logic [N_GC-1:0] core_dispatch_stall = '0, core_commit_none = '0, core_stall_valid = '0;
  logic [31:0] core_stall_pc [N_GC];
  logic [7:0] shader_retired = '0;
  logic gpu_llc_access = 1'b0, gpu_llc_miss = 1'b0;
  stream_e gpu_req_stream = S_TEXTURE;
  logic [3:0] gpu_req_core = '0;
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
  logic [3:0] emergency;
  logic gpu_boost;
  logic [15:0] cpu_prob_q16 [NCH];
  logic [NCH-1:0] ev_cpu_over_crit, ev_emerg_served, ev_crit_served;

  int checks = 0, failures = 0;
  int order [$];

  gpu_crit_mem_top dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) if (dram_cmd_valid[0]) order.push_back(int'(dram_cmd[0].tag));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rtp();
    for (int i = 0; i < NT; i++) begin
      rt_upd_valid = 1'b1;
      rt_upd_tile  = 10'(i);
      @(negedge clk);
    end
    rt_upd_valid = 1'b0;
  endtask

  task automatic end_frame();
    frame_end = 1'b1;
    @(negedge clk);
    frame_end = 1'b0;
  endtask

  task automatic send(mem_req_t r);
    mc_req[0]       = r;
    mc_req_valid[0] = 1'b1;
    @(negedge clk);
    mc_req_valid[0] = 1'b0;
  endtask

  initial begin
    mem_req_t r;
    for (int t = 0; t < NUM_UNIT_TYPES; t++) begin th_in[t] = 8'd4; th_out[t] = 8'd2; end
    for (int i = 0; i < NU; i++) begin unit_pending[i] = '0; unit_completed[i] = '0; end
    // shader cores (instances 17..80) have work but complete little
    for (int i = 17; i < 81; i++) unit_pending[i] = 8'd9;
    for (int c = 0; c < N_GC; c++) core_stall_pc[c] = '0;
    for (int c = 0; c < NCH; c++) mc_req[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- 3D ----
    rtp(); rtp();
    end_frame();
    @(negedge clk);
    check(!fps_learning, "prediction mode after the learning frame");
    rtp();
    repeat (1400) @(negedge clk);
    check(bneck == 5'b00100, $sformatf("shader bottleneck, got %b", bneck));
    check(fps_pred_valid && !fps_below_target && est_frame_cycles < 64'd25_000_000,
          $sformatf("projection %0d cycles meets the target", est_frame_cycles));
    gpu_req_stream = S_TEXTURE;
    #1;
    check(!gpu_req_critical, "target met: texture access not critical");
    rtp();
    end_frame();

    // ---- GPGPU ----
    mode_gpgpu = 1'b1;
    core_dispatch_stall[5] = 1'b1;
    core_commit_none[5]    = 1'b1;
    for (int i = 0; i < 1400; i++) begin
      core_stall_valid[5] = (i < 100);
      core_stall_pc[5]    = (i < 95) ? 32'h0000_1200 : 32'h0000_1340;
      @(negedge clk);
    end
    core_stall_valid = '0;
    check(core_bottleneck == 16'h0020, $sformatf("core bottleneck %h", core_bottleneck));
    gpu_req_stream = S_SHADER;
    gpu_req_core   = 4'd5;
    gpu_req_pc     = 32'h0000_1200;
    #1;
    check(gpu_req_critical && !gpu_req_bypass, "dominant stalling load is critical");

    // DRAM: open row 1 of bank 0, then queue an older CPU request and the
    // younger critical GPU request to row 2 of the busy bank.
    r = '0; r.bank = 3'd0; r.row = 16'd1; r.tag = 8'd1; r.cpu_id = 2'd0;
    send(r);
    r.row = 16'd2; r.tag = 8'd2;
    send(r);
    r.is_gpu = 1'b1; r.critical = gpu_req_critical; r.tag = 8'd3;
    send(r);
    repeat (200) @(negedge clk);
    check(order.size() == 3, $sformatf("%0d commands issued", order.size()));
    if (order.size() == 3)
      check(order[0] == 1 && order[1] == 3 && order[2] == 2,
            $sformatf("issue order %0d %0d %0d: critical GPU request must pass the older CPU one",
                      order[0], order[1], order[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
