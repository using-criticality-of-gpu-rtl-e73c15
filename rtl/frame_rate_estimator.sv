// frame_rate_estimator: run-time projection of the frame time of a 3D
// rendering workload, and whether it misses the target frame rate.
//
// Two modes. In learning mode, which lasts one whole frame, every render
// target plane (RTP) reported by rtp_tracker is stored in the rtp_table
// (updates, cycles, tiles); at the end of the frame the learned RTP count
// N, total updates U and total cycles are kept and the estimator switches
// to prediction mode. In prediction mode it keeps computing
//     lambda = (updates so far in this frame) / U          (capped at 1)
//     C_cur  = average cycles of the RTPs completed in this frame
//     C_avg  = learned cycles / N
//     C_rtp  = lambda * C_cur + (1 - lambda) * C_avg
//     F      = C_rtp * N
// and raises `below_target` while F exceeds TARGET_CYCLES (the frame would
// take longer than the target frame time). The update count of each
// completed RTP of a frame in prediction mode (index below 63, those with
// their own entry) is compared with the learned entry of the same index, and
// the frame's RTP count with N; a difference of more than 1/8 of the
// learned value discards the learned data and makes the next frame a
// learning frame again. Cycle counts are not compared.
//
// The formulas and the two modes follow the source. This design's own
// choices: lambda is the fraction of the learned update count already done,
// in Q16 fixed point; C_cur falls back to C_avg before the first RTP of a
// frame completes; the mismatch threshold (1/8); a mode switch happens only
// at frame boundaries; the first frame after reset is a learning frame;
// TARGET_CYCLES = 25,000,000 (40 frames/s at a 1 GHz GPU clock). One
// estimate takes about 3 * 48 + 3 cycles (three serial divisions); `F`
// and `below_target` update when an estimate finishes and hold during
// learning mode.
module frame_rate_estimator #(
  parameter int unsigned NTILES        = 570,
  parameter int unsigned ENTRIES       = 64,
  parameter longint unsigned TARGET_CYCLES = 64'd25_000_000,
  localparam int unsigned TILE_W       = (NTILES > 1) ? $clog2(NTILES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd_valid,
  input  logic [TILE_W-1:0] upd_tile,
  input  logic [TILE_W:0]   num_tiles,
  input  logic              frame_end,
  output logic              learning,
  output logic              pred_valid,
  output logic [63:0]       est_frame_cycles,
  output logic              below_target,
  output logic              relearn_event      // pulses when learned data is discarded
);
  localparam int unsigned FW    = 32;
  localparam int unsigned DW    = 48;
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  // ---------------- RTP tracking and table ----------------
  logic          rtp_done, frame_done;
  logic [FW-1:0] rtp_updates, rtp_cycles, rtp_tiles, cur_rtp_updates;

  rtp_tracker #(.NTILES(NTILES), .CNT_W(FW)) u_trk (
    .clk, .rst_n, .upd_valid, .upd_tile, .num_tiles, .frame_end,
    .rtp_done, .frame_done, .rtp_updates, .rtp_cycles, .rtp_tiles,
    .cur_updates(cur_rtp_updates)
  );

  logic             tab_clear;
  logic             tab_rec;
  logic [IDX_W-1:0] rd_idx;
  logic             rd_valid;
  logic [FW-1:0]    rd_updates, rd_cycles, rd_tiles, tab_count, tab_sum_upd, tab_sum_cyc;

  rtp_table #(.ENTRIES(ENTRIES), .FW(FW)) u_tab (
    .clk, .rst_n,
    .clear(tab_clear), .rec_valid(tab_rec),
    .rec_updates(rtp_updates), .rec_cycles(rtp_cycles), .rec_tiles(rtp_tiles),
    .rd_idx, .rd_valid, .rd_updates, .rd_cycles, .rd_tiles,
    .count(tab_count), .sum_updates(tab_sum_upd), .sum_cycles(tab_sum_cyc)
  );

  // ---------------- mode control ----------------
  logic [FW-1:0] n_learn, u_learn, cy_learn;
  logic [FW-1:0] cur_rtps, cur_rtp_cyc, cur_done_upd;
  logic          mismatch;

  assign tab_rec = learning && rtp_done;
  assign rd_idx  = (cur_rtps >= FW'(ENTRIES - 1)) ? IDX_W'(ENTRIES - 1) : IDX_W'(cur_rtps);

  function automatic logic differs(logic [FW-1:0] seen, logic [FW-1:0] learned);
    logic [FW:0] d;
    d = (seen > learned) ? {1'b0, seen - learned} : {1'b0, learned - seen};
    return (FW + 4)'(d) * 8 > (FW + 4)'(learned);
  endfunction

  // Discard the learned data at the end of a predicted frame that did not
  // match it.
  logic relearn;
  always_comb begin
    logic [FW-1:0] nr;
    nr      = cur_rtps + FW'(rtp_done);
    relearn = frame_done && !learning &&
              (mismatch || differs(nr, n_learn) ||
               (rtp_done && cur_rtps < FW'(ENTRIES - 1) &&
                (!rd_valid || differs(rtp_updates, rd_updates))));
  end
  assign tab_clear = relearn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      learning      <= 1'b1;
      n_learn       <= '0;
      u_learn       <= '0;
      cy_learn      <= '0;
      cur_rtps      <= '0;
      cur_rtp_cyc   <= '0;
      cur_done_upd  <= '0;
      mismatch      <= 1'b0;
      relearn_event <= 1'b0;
    end else begin
      relearn_event <= 1'b0;
      if (rtp_done) begin
        cur_rtps     <= cur_rtps + FW'(1);
        cur_rtp_cyc  <= cur_rtp_cyc + rtp_cycles;
        cur_done_upd <= cur_done_upd + rtp_updates;
        if (!learning && cur_rtps < FW'(ENTRIES - 1) &&
            (!rd_valid || differs(rtp_updates, rd_updates)))
          mismatch <= 1'b1;
      end
      if (frame_done) begin
        // rtp_done of a partial last RTP arrives in the same cycle; the
        // counts of this frame are restarted here.
        cur_rtps     <= '0;
        cur_rtp_cyc  <= '0;
        cur_done_upd <= '0;
        mismatch     <= 1'b0;
        if (learning) begin
          // A record written in this same cycle is not yet in the table's
          // totals, so it is added explicitly.
          n_learn  <= tab_count   + FW'(rtp_done);
          u_learn  <= tab_sum_upd + (rtp_done ? rtp_updates : '0);
          cy_learn <= tab_sum_cyc + (rtp_done ? rtp_cycles  : '0);
          if (tab_count + FW'(rtp_done) != '0) learning <= 1'b0;
        end else begin
          if (relearn) begin
            learning      <= 1'b1;
            relearn_event <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- estimate computation ----------------
  typedef enum logic [2:0] {E_IDLE, E_CAVG, E_CCUR, E_LAMBDA, E_MUL, E_OUT} est_e;
  est_e st;

  logic          dv_start, dv_busy, dv_done;
  logic [DW-1:0] dv_a, dv_b, dv_q, dv_r;

  serial_divider #(.W(DW)) u_div (
    .clk, .rst_n, .start(dv_start), .dividend(dv_a), .divisor(dv_b),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q), .remainder(dv_r)
  );

  logic [FW-1:0] s_rtps, s_rtp_cyc, s_upd;
  logic [FW-1:0] c_avg, c_cur;
  logic [16:0]   lambda;
  logic [63:0]   c_rtp_q16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= E_IDLE;
      dv_start         <= 1'b0;
      dv_a             <= '0;
      dv_b             <= '0;
      s_rtps           <= '0;
      s_rtp_cyc        <= '0;
      s_upd            <= '0;
      c_avg            <= '0;
      c_cur            <= '0;
      lambda           <= '0;
      c_rtp_q16        <= '0;
      pred_valid       <= 1'b0;
      est_frame_cycles <= '0;
      below_target     <= 1'b0;
    end else begin
      dv_start <= 1'b0;
      unique case (st)
        E_IDLE: begin
          if (!learning && !dv_busy && !dv_start) begin
            s_rtps    <= cur_rtps;
            s_rtp_cyc <= cur_rtp_cyc;
            s_upd     <= cur_done_upd + cur_rtp_updates;
            dv_a      <= DW'(cy_learn);
            dv_b      <= DW'(n_learn);
            dv_start  <= 1'b1;
            st        <= E_CAVG;
          end
        end
        E_CAVG: if (dv_done) begin
          c_avg <= FW'(dv_q);
          if (s_rtps == '0) begin
            c_cur    <= FW'(dv_q);
            dv_a     <= DW'(s_upd) << 16;
            dv_b     <= DW'(u_learn);
            dv_start <= 1'b1;
            st       <= E_LAMBDA;
          end else begin
            dv_a     <= DW'(s_rtp_cyc);
            dv_b     <= DW'(s_rtps);
            dv_start <= 1'b1;
            st       <= E_CCUR;
          end
        end
        E_CCUR: if (dv_done) begin
          c_cur    <= FW'(dv_q);
          dv_a     <= DW'(s_upd) << 16;
          dv_b     <= DW'(u_learn);
          dv_start <= 1'b1;
          st       <= E_LAMBDA;
        end
        E_LAMBDA: if (dv_done) begin
          lambda <= (dv_q > DW'(17'h10000)) ? 17'h10000 : dv_q[16:0];
          st     <= E_MUL;
        end
        E_MUL: begin
          c_rtp_q16 <= 64'(lambda) * 64'(c_cur) + 64'(17'h10000 - lambda) * 64'(c_avg);
          st        <= E_OUT;
        end
        E_OUT: begin
          logic [63:0] f;
          f = (c_rtp_q16 >> 16) * 64'(n_learn);
          est_frame_cycles <= f;
          below_target     <= (f > TARGET_CYCLES);
          pred_valid       <= 1'b1;
          st               <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
      if (learning) pred_valid <= 1'b0;
    end
  end
endmodule
