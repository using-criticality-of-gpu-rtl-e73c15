// stall_table: per-shader-core table of the load instructions that stall
// dispatch, with the stall cycles each has caused.
//
// ENTRIES fully associative entries hold a PC, a saturating stall-cycle
// count, a valid bit and an LRU age of log2(ENTRIES) bits (16 entries of
// 32 + 32 + 1 + 4 = 69 bits by default, as in the source). In every cycle
// in which dispatch stalls on an operand produced by a load that missed in
// the core's private cache, the producer's PC is presented on `stall_pc`
// with `stall_valid`: a matching entry adds one stall cycle, otherwise the
// first invalid or else the least recently used entry is replaced by the PC
// with a count of one. LRU ages are a true LRU order: the touched entry gets
// age 0 and younger entries age by one.
//
// The lookup port answers, combinationally, whether `lookup_pc` is in the
// table and whether it belongs to the top few PCs that cover 90% of all
// recorded stall cycles. The latter is computed here as: the stall cycles of
// all entries ranked strictly ahead of it (larger count, or equal count and
// lower slot) are less than 90% of the total, i.e. the PC is taken while the
// coverage accumulated so far is still below 90%. That ranking rule is this
// design's reading of "top few PCs covering up to 90%". Counts are never
// cleared (the source does not say when they would be).
module stall_table #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned PC_W    = 32,
  parameter int unsigned CNT_W   = 32,
  localparam int unsigned AGE_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned SUM_W  = CNT_W + AGE_W + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stall_valid,
  input  logic [PC_W-1:0] stall_pc,
  input  logic [PC_W-1:0] lookup_pc,
  output logic            lookup_hit,
  output logic            lookup_top,
  output logic [SUM_W-1:0] total_stall
);
  logic [PC_W-1:0]  pc    [ENTRIES];
  logic [CNT_W-1:0] cnt   [ENTRIES];
  logic [AGE_W-1:0] age   [ENTRIES];
  logic [ENTRIES-1:0] valid;

  // ---------------- update side ----------------
  logic             upd_hit;
  logic [AGE_W-1:0] upd_idx;
  logic [AGE_W-1:0] victim;
  logic             have_free;

  always_comb begin
    upd_hit   = 1'b0;
    upd_idx   = '0;
    have_free = 1'b0;
    victim    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid[i] && pc[i] == stall_pc && !upd_hit) begin
        upd_hit = 1'b1;
        upd_idx = AGE_W'(i);
      end
    end
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        have_free = 1'b1;
        victim    = AGE_W'(i);
      end
    end
    if (!have_free) begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (age[i] == AGE_W'(ENTRIES - 1)) victim = AGE_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        pc[i]  <= '0;
        cnt[i] <= '0;
        age[i] <= '0;
      end
    end else if (stall_valid) begin
      logic [AGE_W-1:0] tgt;
      logic [AGE_W-1:0] ref_age;
      tgt     = upd_hit ? upd_idx : victim;
      ref_age = upd_hit ? age[upd_idx] : AGE_W'(ENTRIES - 1);
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (valid[i] && AGE_W'(i) != tgt && age[i] < ref_age) age[i] <= age[i] + AGE_W'(1);
      end
      age[tgt] <= '0;
      if (upd_hit) begin
        if (cnt[tgt] != '1) cnt[tgt] <= cnt[tgt] + CNT_W'(1);
      end else begin
        valid[tgt] <= 1'b1;
        pc[tgt]    <= stall_pc;
        cnt[tgt]   <= CNT_W'(1);
      end
    end
  end

  // ---------------- lookup side ----------------
  always_comb begin
    logic [AGE_W-1:0] li;
    logic [SUM_W-1:0] ahead;
    lookup_hit  = 1'b0;
    li          = '0;
    total_stall = '0;
    ahead       = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid[i]) total_stall = total_stall + SUM_W'(cnt[i]);
      if (valid[i] && pc[i] == lookup_pc && !lookup_hit) begin
        lookup_hit = 1'b1;
        li         = AGE_W'(i);
      end
    end
    for (int unsigned j = 0; j < ENTRIES; j++) begin
      if (valid[j] && AGE_W'(j) != li &&
          (cnt[j] > cnt[li] || (cnt[j] == cnt[li] && AGE_W'(j) < li)))
        ahead = ahead + SUM_W'(cnt[j]);
    end
    // ahead < 0.9 * total  <=>  10 * ahead < 9 * total
    lookup_top = lookup_hit && ((SUM_W + 4)'(ahead) * 10 < (SUM_W + 4)'(total_stall) * 9);
  end
endmodule
