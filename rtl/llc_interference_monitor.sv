// llc_interference_monitor: LLC interference detection of the IM-LLC
// policy.
//
// For each of N_CPU CPU applications the LLC lookups and misses are counted
// over intervals of INTERVAL cycles. At the end of an interval each
// application is classed by its miss rate: H above 70%, M above 10% up to
// 70%, L at most 10% (an interval without lookups counts as L). An
// application that moves from L to M or to H between two consecutive
// intervals enters emergency mode; the first interval after reset has no
// predecessor, so it only sets the classes. At the end of later intervals, an
// application in emergency mode that is back in L stays in emergency mode,
// and one still in M or H leaves it. `active` is high while at least one
// application is in emergency mode; the DRAM scheduler then serves that
// application's requests at the level of critical GPU requests. Classes and
// transitions follow the source; the interval length is this design's
// choice. Outputs are registered at interval ends.
module llc_interference_monitor
  import crit_pkg::*;
#(
  parameter int unsigned N_CPU    = 4,
  parameter int unsigned INTERVAL = 65536,
  parameter int unsigned CNT_W    = 24,
  localparam int unsigned ID_W    = (N_CPU > 1) ? $clog2(N_CPU) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             acc_valid,
  input  logic [ID_W-1:0]  acc_cpu,
  input  logic             acc_miss,
  output intensity_e       cls       [N_CPU],
  output logic [N_CPU-1:0] emergency,
  output logic             active,
  output logic             interval_end
);
  localparam int unsigned IW = (INTERVAL > 1) ? $clog2(INTERVAL) : 1;

  logic [IW-1:0]    tick;
  logic             classed;   // an interval has been classified since reset
  logic [CNT_W-1:0] acc [N_CPU];
  logic [CNT_W-1:0] mis [N_CPU];

  assign interval_end = (tick == IW'(INTERVAL - 1));
  assign active       = |emergency;

  function automatic intensity_e classify(logic [CNT_W-1:0] a, logic [CNT_W-1:0] m);
    logic [CNT_W+7:0] a100, m100;
    a100 = (CNT_W + 8)'(a);
    m100 = (CNT_W + 8)'(m) * 100;
    if (m100 > a100 * 70)      return INT_H;
    else if (m100 > a100 * 10) return INT_M;
    else                       return INT_L;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick      <= '0;
      classed   <= 1'b0;
      emergency <= '0;
      for (int unsigned i = 0; i < N_CPU; i++) begin
        acc[i] <= '0;
        mis[i] <= '0;
        cls[i] <= INT_L;
      end
    end else begin
      for (int unsigned i = 0; i < N_CPU; i++) begin
        logic [CNT_W-1:0] a, m;
        intensity_e nc;
        a = acc[i];
        m = mis[i];
        if (acc_valid && acc_cpu == ID_W'(i) && a != '1) begin
          a = a + CNT_W'(1);
          if (acc_miss) m = m + CNT_W'(1);
        end
        if (interval_end) begin
          nc     = classify(a, m);
          cls[i] <= nc;
          if (emergency[i]) begin
            if (nc != INT_L) emergency[i] <= 1'b0;
          end else if (classed && cls[i] == INT_L && nc != INT_L) begin
            emergency[i] <= 1'b1;
          end
          acc[i] <= '0;
          mis[i] <= '0;
        end else begin
          acc[i] <= a;
          mis[i] <= m;
        end
      end
      tick <= interval_end ? '0 : tick + IW'(1);
      if (interval_end) classed <= 1'b1;
    end
  end
endmodule
