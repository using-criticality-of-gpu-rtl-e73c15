// dram_scheduler: criticality-aware request scheduler of one DRAM channel.
//
// Requests (LLC misses) enter a QDEPTH-entry queue kept in arrival order,
// oldest at slot 0. Each request carries its source (CPU core or GPU) and,
// for the GPU, the criticality bit set on the GPU side. Every cycle one
// request may be issued to a bank that is idle while the channel's data bus
// is free. The request picked is the one with the largest key
// {row hit, priority level}, the oldest among equals: requests to an open
// row go first, critical ones among them first; when a row must be opened,
// the oldest request of the highest level wins rather than the global
// oldest. Priority levels:
//   3  CPU request, IM policy, in a cycle in which the IM-SCHED coin
//      (probability `cpu_prob_q16`) says a CPU request goes ahead of
//      critical GPU requests
//   2  critical GPU request; every GPU request while `gpu_boost` is set;
//      under the IM policy, a request of a CPU application in LLC-interference
//      emergency mode while IM-LLC is active
//   1  other CPU requests
//   0  non-critical GPU requests
// With `policy_im` low the scheduler applies the GPU-favoring policy (no
// coin, no emergency promotion). A CPU request that is waiting while a
// younger critical GPU request is issued is flagged; when it is issued,
// `cpu_served` pulses with `cpu_deprio` set to that flag, which feeds
// IM-SCHED. The policies follow the source. This design's own choices: the
// queue depth, the open-page bank model with a bank occupied for
// T_BURST (row hit), T_RCD + T_BURST (closed bank) or
// T_RP + T_RCD + T_BURST (row conflict) cycles, one column command per
// T_BURST cycles on the channel, and 14-cycle tRCD/tRP with BL8 (4 clocks)
// taken from a 14-14-14 DDR3 part. The issued command appears on `cmd`
// registered, one cycle after the decision.
module dram_scheduler
  import crit_pkg::*;
#(
  parameter int unsigned QDEPTH  = 32,
  parameter int unsigned NBANK   = 8,
  parameter int unsigned N_CPU   = 4,
  parameter int unsigned T_RCD   = 14,
  parameter int unsigned T_RP    = 14,
  parameter int unsigned T_BURST = 4,
  parameter logic [15:0] SEED    = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  // request side
  input  logic             req_valid,
  input  mem_req_t         req,
  output logic             req_ready,
  // command side
  output logic             cmd_valid,
  output dram_cmd_t        cmd,
  // policy controls
  input  logic             policy_im,
  input  logic [15:0]      cpu_prob_q16,
  input  logic             im_llc_active,
  input  logic [N_CPU-1:0] emergency,
  input  logic             gpu_boost,
  // events
  output logic             cpu_served,
  output logic             cpu_deprio,
  output logic             crit_served,
  output logic             cpu_over_crit,   // coin put a CPU request ahead of a waiting critical GPU one
  output logic             emerg_served,
  output logic [$clog2(QDEPTH+1)-1:0] occupancy
);
  localparam int unsigned QI_W = $clog2(QDEPTH);
  localparam int unsigned OC_W = $clog2(QDEPTH + 1);
  localparam int unsigned BC_W = $clog2(T_RP + T_RCD + T_BURST + 1);

  mem_req_t          q      [QDEPTH];
  logic [QDEPTH-1:0] qv;
  logic [QDEPTH-1:0] qdep;     // CPU entry passed over by a younger critical GPU entry

  logic [NBANK-1:0]  open_v;
  logic [ROW_W-1:0]  open_row [NBANK];
  logic [BC_W-1:0]   bank_busy [NBANK];
  logic [BC_W-1:0]   bus_busy;

  logic [15:0] rnd;
  logic        coin;

  lfsr16 #(.SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .value(rnd));
  assign coin = policy_im && ({1'b0, rnd} < {1'b0, cpu_prob_q16});

  assign occupancy = OC_W'($countones(qv));
  assign req_ready = !qv[QDEPTH-1];

  // ---------------- selection ----------------
  logic            sel_v;
  logic [QI_W-1:0] sel;
  logic [2:0]      sel_key;
  logic            crit_waiting;

  function automatic logic [1:0] level_of(mem_req_t r, logic c);
    if (r.is_gpu) begin
      if (gpu_boost || r.critical) return 2'd2;
      else                         return 2'd0;
    end else begin
      if (c)                                                   return 2'd3;
      else if (policy_im && im_llc_active && emergency[r.cpu_id]) return 2'd2;
      else                                                     return 2'd1;
    end
  endfunction

  always_comb begin
    sel_v        = 1'b0;
    sel          = '0;
    sel_key      = '0;
    crit_waiting = 1'b0;
    for (int unsigned i = 0; i < QDEPTH; i++) begin
      logic       hit;
      logic [2:0] key;
      if (qv[i] && q[i].is_gpu && q[i].critical) crit_waiting = 1'b1;
      hit = open_v[q[i].bank] && open_row[q[i].bank] == q[i].row;
      key = {hit, level_of(q[i], coin)};
      if (qv[i] && bank_busy[q[i].bank] == '0 && bus_busy == '0 &&
          (!sel_v || key > sel_key)) begin
        sel_v   = 1'b1;
        sel     = QI_W'(i);
        sel_key = key;
      end
    end
  end

  // ---------------- queue, banks, command ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qv            <= '0;
      qdep          <= '0;
      open_v        <= '0;
      bus_busy      <= '0;
      cmd_valid     <= 1'b0;
      cmd           <= '0;
      cpu_served    <= 1'b0;
      cpu_deprio    <= 1'b0;
      crit_served   <= 1'b0;
      cpu_over_crit <= 1'b0;
      emerg_served  <= 1'b0;
      for (int unsigned i = 0; i < QDEPTH; i++) q[i] <= '0;
      for (int unsigned b = 0; b < NBANK; b++) begin
        open_row[b]  <= '0;
        bank_busy[b] <= '0;
      end
    end else begin
      mem_req_t          nq  [QDEPTH];
      logic [QDEPTH-1:0] nqv, nqd;
      int unsigned       cnt;

      for (int unsigned b = 0; b < NBANK; b++)
        if (bank_busy[b] != '0) bank_busy[b] <= bank_busy[b] - BC_W'(1);
      if (bus_busy != '0) bus_busy <= bus_busy - BC_W'(1);

      nq  = q;
      nqv = qv;
      nqd = qdep;

      cmd_valid     <= sel_v;
      cpu_served    <= 1'b0;
      cpu_deprio    <= 1'b0;
      crit_served   <= 1'b0;
      cpu_over_crit <= 1'b0;
      emerg_served  <= 1'b0;

      if (sel_v) begin
        mem_req_t r;
        logic     hit;
        r   = q[sel];
        hit = open_v[r.bank] && open_row[r.bank] == r.row;
        cmd.activate  <= !hit;
        cmd.precharge <= open_v[r.bank] && !hit;
        cmd.bank      <= r.bank;
        cmd.row       <= r.row;
        cmd.col       <= r.col;
        cmd.tag       <= r.tag;
        cmd.is_gpu    <= r.is_gpu;
        cmd.critical  <= r.critical;
        open_v[r.bank]   <= 1'b1;
        open_row[r.bank] <= r.row;
        bus_busy         <= BC_W'(T_BURST - 1);
        if (hit)                 bank_busy[r.bank] <= BC_W'(T_BURST - 1);
        else if (open_v[r.bank]) bank_busy[r.bank] <= BC_W'(T_RP + T_RCD + T_BURST - 1);
        else                     bank_busy[r.bank] <= BC_W'(T_RCD + T_BURST - 1);

        if (r.is_gpu && r.critical) begin
          crit_served <= 1'b1;
          // older CPU requests have just been passed over
          for (int unsigned i = 0; i < QDEPTH; i++)
            if (i < sel && qv[i] && !q[i].is_gpu) nqd[i] = 1'b1;
        end
        if (!r.is_gpu) begin
          cpu_served    <= 1'b1;
          cpu_deprio    <= qdep[sel];
          cpu_over_crit <= coin && crit_waiting;
          emerg_served  <= policy_im && im_llc_active && emergency[r.cpu_id];
        end
        // remove the issued entry, keeping arrival order
        for (int unsigned i = 0; i < QDEPTH; i++) begin
          if (i >= sel) begin
            if (i + 1 < QDEPTH) begin
              nq[i]  = q[i + 1];
              nqv[i] = qv[i + 1];
              nqd[i] = nqd[i + 1];
            end else begin
              nqv[i] = 1'b0;
              nqd[i] = 1'b0;
            end
          end
        end
      end

      // append the new request behind the valid entries
      cnt = 0;
      for (int unsigned i = 0; i < QDEPTH; i++) if (nqv[i]) cnt++;
      if (req_valid && req_ready && cnt < QDEPTH) begin
        nq[cnt]  = req;
        nqv[cnt] = 1'b1;
        nqd[cnt] = 1'b0;
      end

      q    <= nq;
      qv   <= nqv;
      qdep <= nqd;
    end
  end

  // A request is only accepted while the queue has room.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (req_valid && req_ready) |=> (occupancy != '0));
endmodule
