// bottleneck_finder: periodic search for the bottlenecked units of the
// rendering pipeline.
//
// Every PERIOD cycles the occupancy/throughput summary of the five unit
// types is evaluated and the resulting bottleneck vector is registered. A
// single-instance unit (FE, BT) or the ZS/CW units is bottlenecked when its
// Throughput bit is 0 and its IOccupancy bit is 1; the shader array needs
// AOccupancy = 1 instead (all cores have work, yet throughput is low). CW and
// BT are checked first. If CW is underloaded (AOccupancy = 0) the path
// FE-ZS-SH-CW (early-Z) or FE-SH-ZS-CW (late-Z) is walked from back to
// front; at each underloaded unit the unit in front of it is examined, and
// reaching the front end checks FE, which when bottlenecked also marks ZS and
// SH. This order follows the source's algorithm; the evaluation period is
// this design's choice. Output `bneck` changes one cycle after the period
// boundary and `update` pulses in that cycle.
module bottleneck_finder
  import crit_pkg::*;
#(
  parameter int unsigned PERIOD = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       early_z,
  input  unit_stat_t stat [NUM_UNIT_TYPES],
  output bneck_t     bneck,
  output logic       update
);
  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] tick;
  bneck_t        next_b;

  always_comb begin
    unit_stat_t fe, zs, sh, cw, bt;
    logic sh_under, zs_under;
    fe = stat[U_FE];
    zs = stat[U_ZS];
    sh = stat[U_SH];
    cw = stat[U_CW];
    bt = stat[U_BT];
    sh_under = !sh.ao;
    zs_under = !zs.ao;
    next_b = '0;
    if (!cw.th && cw.io) next_b.cw = 1'b1;
    if (!bt.th && bt.io) next_b.bt = 1'b1;
    if (!cw.ao) begin
      if (early_z) begin
        if (!sh.th && sh.ao) next_b.sh = 1'b1;
        if (sh_under) begin
          if (!zs.th && zs.io) next_b.zs = 1'b1;
          if (zs_under && !fe.th && fe.io) begin
            next_b.fe = 1'b1;
            next_b.sh = 1'b1;
            next_b.zs = 1'b1;
          end
        end
      end else begin
        if (!zs.th && zs.io) next_b.zs = 1'b1;
        if (zs_under) begin
          if (!sh.th && sh.ao) next_b.sh = 1'b1;
          if (sh_under && !fe.th && fe.io) begin
            next_b.fe = 1'b1;
            next_b.sh = 1'b1;
            next_b.zs = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick   <= '0;
      bneck  <= '0;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (tick == PW'(PERIOD - 1)) begin
        tick   <= '0;
        bneck  <= next_b;
        update <= 1'b1;
      end else begin
        tick <= tick + PW'(1);
      end
    end
  end
endmodule
