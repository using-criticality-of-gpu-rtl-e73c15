// pipeline_monitor: request flow monitors for the whole rendering queuing
// network and the per-unit-type occupancy/throughput summary.
//
// The network has one front end (FE), N_ROP depth/stencil units (ZS),
// N_SH shader cores (SH), N_ROP color writers (CW) and one blitter (BT):
// 1 + 16 + 64 + 16 + 1 = 98 monitored instances at the default sizes, each
// with a C_in and a C_out counter (flow_monitor). Instances are numbered
// FE, ZS[0..N_ROP-1], SH[0..N_SH-1], CW[0..N_ROP-1], BT on the `pending`
// and `completed` arrays. From the counters three bits are formed per unit
// type: IOccupancy (C_in of any instance above the mid-point), AOccupancy
// (C_in of all instances above it) and Throughput (C_out of all instances
// above it). Thresholds are given per unit type, as in the source, where one
// threshold serves all instances of a type. The summary is combinational
// from the counter registers.
module pipeline_monitor
  import crit_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned N_ROP = 16,
  parameter int unsigned N_SH  = 64,
  parameter int unsigned CNT_W = 8,
  localparam int unsigned NU   = 2 + 2 * N_ROP + N_SH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [CNT_W-1:0] pending   [NU],
  input  logic [CNT_W-1:0] completed [NU],
  input  logic [CNT_W-1:0] th_in     [NUM_UNIT_TYPES],   // indexed by unit_e
  input  logic [CNT_W-1:0] th_out    [NUM_UNIT_TYPES],
  output unit_stat_t       stat      [NUM_UNIT_TYPES]
);
  localparam int unsigned ZS0 = 1;
  localparam int unsigned SH0 = 1 + N_ROP;
  localparam int unsigned CW0 = 1 + N_ROP + N_SH;
  localparam int unsigned BTI = 1 + 2 * N_ROP + N_SH;

  logic [NU-1:0] in_high, out_high;

  function automatic int unsigned type_of(int unsigned i);
    if (i == 0)        return int'(U_FE);
    else if (i < SH0)  return int'(U_ZS);
    else if (i < CW0)  return int'(U_SH);
    else if (i < BTI)  return int'(U_CW);
    else               return int'(U_BT);
  endfunction

  for (genvar i = 0; i < NU; i++) begin : g_mon
    localparam int unsigned T = type_of(i);
    logic [W-1:0] cin_unused, cout_unused;
    flow_monitor #(.W(W), .CNT_W(CNT_W)) u_mon (
      .clk, .rst_n, .clear,
      .pending  (pending[i]),
      .completed(completed[i]),
      .th_in    (th_in[T]),
      .th_out   (th_out[T]),
      .in_high  (in_high[i]),
      .out_high (out_high[i]),
      .c_in     (cin_unused),
      .c_out    (cout_unused)
    );
  end

  function automatic unit_stat_t summarize(logic [NU-1:0] ih, logic [NU-1:0] oh,
                                           int unsigned lo, int unsigned n);
    unit_stat_t s;
    s.io = 1'b0;
    s.ao = 1'b1;
    s.th = 1'b1;
    for (int unsigned k = 0; k < NU; k++) begin
      if (k >= lo && k < lo + n) begin
        s.io = s.io | ih[k];
        s.ao = s.ao & ih[k];
        s.th = s.th & oh[k];
      end
    end
    return s;
  endfunction

  always_comb begin
    stat[U_FE] = summarize(in_high, out_high, 0,   1);
    stat[U_ZS] = summarize(in_high, out_high, ZS0, N_ROP);
    stat[U_SH] = summarize(in_high, out_high, SH0, N_SH);
    stat[U_CW] = summarize(in_high, out_high, CW0, N_ROP);
    stat[U_BT] = summarize(in_high, out_high, BTI, 1);
  end
endmodule
