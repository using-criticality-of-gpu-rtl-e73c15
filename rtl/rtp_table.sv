// rtp_table: RTP information table of the frame rate estimator.
//
// ENTRIES (64) entries each hold, for one render target plane of the learned
// frame, the number of updates, the cycles it took and its number of tiles,
// 32 bits each, plus a valid bit (97 bits per entry, as in the source).
// `clear` empties the table; `rec_valid` appends a record at the next free
// entry. Once the last entry is in use, further records are added into it,
// so it accumulates all RTPs beyond the 63rd. `count` is the number of RTPs
// recorded (not capped), and `sum_updates`/`sum_cycles` are running totals of
// the recorded fields. A read port returns an entry combinationally.
module rtp_table #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned FW      = 32,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             rec_valid,
  input  logic [FW-1:0]    rec_updates,
  input  logic [FW-1:0]    rec_cycles,
  input  logic [FW-1:0]    rec_tiles,
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_valid,
  output logic [FW-1:0]    rd_updates,
  output logic [FW-1:0]    rd_cycles,
  output logic [FW-1:0]    rd_tiles,
  output logic [FW-1:0]    count,
  output logic [FW-1:0]    sum_updates,
  output logic [FW-1:0]    sum_cycles
);
  logic [FW-1:0]      upd_m [ENTRIES];
  logic [FW-1:0]      cyc_m [ENTRIES];
  logic [FW-1:0]      til_m [ENTRIES];
  logic [ENTRIES-1:0] valid;

  logic [IDX_W-1:0] wr_idx;
  assign wr_idx = (count >= FW'(ENTRIES - 1)) ? IDX_W'(ENTRIES - 1) : IDX_W'(count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid       <= '0;
      count       <= '0;
      sum_updates <= '0;
      sum_cycles  <= '0;
    end else if (clear) begin
      valid       <= '0;
      count       <= '0;
      sum_updates <= '0;
      sum_cycles  <= '0;
    end else if (rec_valid) begin
      valid[wr_idx] <= 1'b1;
      count         <= count + FW'(1);
      sum_updates   <= sum_updates + rec_updates;
      sum_cycles    <= sum_cycles + rec_cycles;
    end
  end

  // Storage: plain array with a single write per cycle.
  always_ff @(posedge clk) begin
    if (rec_valid && !clear) begin
      if (valid[wr_idx]) begin
        upd_m[wr_idx] <= upd_m[wr_idx] + rec_updates;
        cyc_m[wr_idx] <= cyc_m[wr_idx] + rec_cycles;
        til_m[wr_idx] <= til_m[wr_idx] + rec_tiles;
      end else begin
        upd_m[wr_idx] <= rec_updates;
        cyc_m[wr_idx] <= rec_cycles;
        til_m[wr_idx] <= rec_tiles;
      end
    end
  end

  assign rd_valid   = valid[rd_idx];
  assign rd_updates = valid[rd_idx] ? upd_m[rd_idx] : '0;
  assign rd_cycles  = valid[rd_idx] ? cyc_m[rd_idx] : '0;
  assign rd_tiles   = valid[rd_idx] ? til_m[rd_idx] : '0;
endmodule
