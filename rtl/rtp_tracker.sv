// rtp_tracker: delimits render target planes (RTPs) in the stream of
// render-target updates.
//
// The render target is divided into `num_tiles` equal t x t tiles (a
// run-time setting, since it follows the screen resolution; NTILES is the
// largest count the touched-tile vector can hold). Each update to the
// render target (`upd_valid` with the tile it falls in) marks its tile as
// touched and is counted; a tile index at or beyond `num_tiles` is counted
// as an update but touches nothing. An RTP is the batch of updates that, for
// the first time since the previous RTP ended, has touched every tile; when
// the last untouched tile is hit, the RTP is closed and reported on
// `rtp_done` with its number of updates, the cycles it took (from the cycle
// after the previous RTP closed up to and including this one) and its tile
// count. At `frame_end` a partly covered RTP is closed as well, with the
// number of tiles it did touch, and `frame_done` pulses with it. The tile
// size t is not fixed by the source; the default capacity of 570 tiles is
// this design's choice: it covers 1920x1200 with 64x64 tiles (30 x 19),
// and so also 1600x1200 (25 x 19 = 475) and 1280x1024 (20 x 16 = 320).
// `num_tiles` must only change between RTPs. Outputs are registered: they
// appear the cycle after the closing update. `rtp_tiles` is CNT_W wide like
// the other record fields; its bits above TILE_W are always zero.
module rtp_tracker #(
  parameter int unsigned NTILES = 570,
  parameter int unsigned CNT_W  = 32,
  localparam int unsigned TILE_W = (NTILES > 1) ? $clog2(NTILES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd_valid,
  input  logic [TILE_W-1:0] upd_tile,
  input  logic [TILE_W:0]   num_tiles,     // tiles in the render target, 1..NTILES
  input  logic              frame_end,
  output logic              rtp_done,
  output logic              frame_done,
  output logic [CNT_W-1:0]  rtp_updates,
  output logic [CNT_W-1:0]  rtp_cycles,
  output logic [CNT_W-1:0]  rtp_tiles,
  output logic [CNT_W-1:0]  cur_updates   // updates of the RTP in progress
);
  logic [NTILES-1:0] touched;
  logic [TILE_W:0]   ntouched;
  logic [CNT_W-1:0]  cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      touched     <= '0;
      ntouched    <= '0;
      cur_updates <= '0;
      cyc         <= '0;
      rtp_done    <= 1'b0;
      frame_done  <= 1'b0;
      rtp_updates <= '0;
      rtp_cycles  <= '0;
      rtp_tiles   <= '0;
    end else begin
      logic              fresh;
      logic [TILE_W:0]   nt;
      logic [CNT_W-1:0]  nu;
      logic [CNT_W-1:0]  nc;
      fresh = upd_valid && ((TILE_W + 1)'(upd_tile) < num_tiles) && !touched[upd_tile];
      nt    = ntouched + (TILE_W + 1)'(fresh);
      nu    = cur_updates + CNT_W'(upd_valid);
      nc    = cyc + CNT_W'(1);
      rtp_done   <= 1'b0;
      frame_done <= frame_end;
      if (nt == num_tiles || (frame_end && nu != '0)) begin
        rtp_done    <= 1'b1;
        rtp_updates <= nu;
        rtp_cycles  <= nc;
        rtp_tiles   <= CNT_W'(nt);
        touched     <= '0;
        ntouched    <= '0;
        cur_updates <= '0;
        cyc         <= '0;
      end else begin
        if (fresh) touched[upd_tile] <= 1'b1;
        ntouched    <= nt;
        cur_updates <= nu;
        cyc         <= frame_end ? '0 : nc;
      end
    end
  end
endmodule
