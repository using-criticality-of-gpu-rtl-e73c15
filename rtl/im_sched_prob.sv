// im_sched_prob: CPU prioritisation probability of the IM-SCHED policy.
//
// Over each interval of INTERVAL cycles the scheduler reports every CPU
// request it serves (`cpu_served`) and whether that request had been passed
// over by a younger critical GPU request while it waited (`cpu_deprio`). At
// the end of the interval the fraction deprio/served becomes the
// probability, in Q16 (0x10000 = 1), with which a CPU request is placed
// ahead of critical GPU requests during the next interval; it is capped at
// one half (0x8000). An interval that served no CPU request gives 0. The
// rule follows the source; the interval length and the Q16 format are this
// design's choices. The division runs on a serial divider, so `prob_q16`
// changes about 33 cycles after the interval ends.
module im_sched_prob #(
  parameter int unsigned INTERVAL = 65536,
  parameter int unsigned CNT_W    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_served,
  input  logic        cpu_deprio,
  output logic [15:0] prob_q16,
  output logic        interval_end
);
  localparam int unsigned IW = (INTERVAL > 1) ? $clog2(INTERVAL) : 1;
  localparam int unsigned DW = CNT_W + 16;

  logic [IW-1:0]    tick;
  logic [CNT_W-1:0] served, deprio;
  logic             dv_start, dv_busy, dv_done;
  logic [DW-1:0]    dv_a, dv_b, dv_q, dv_r;

  serial_divider #(.W(DW)) u_div (
    .clk, .rst_n, .start(dv_start), .dividend(dv_a), .divisor(dv_b),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q), .remainder(dv_r)
  );

  assign interval_end = (tick == IW'(INTERVAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick     <= '0;
      served   <= '0;
      deprio   <= '0;
      dv_start <= 1'b0;
      dv_a     <= '0;
      dv_b     <= '0;
      prob_q16 <= '0;
    end else begin
      logic [CNT_W-1:0] s, d;
      s = served + CNT_W'(cpu_served && served != '1);
      d = deprio + CNT_W'(cpu_served && cpu_deprio && deprio != '1 && served != '1);
      dv_start <= 1'b0;
      if (interval_end) begin
        tick   <= '0;
        served <= '0;
        deprio <= '0;
        if (s == '0) begin
          prob_q16 <= '0;
        end else if (!dv_busy) begin
          dv_a     <= DW'(d) << 16;
          dv_b     <= DW'(s);
          dv_start <= 1'b1;
        end
      end else begin
        tick   <= tick + IW'(1);
        served <= s;
        deprio <= d;
      end
      if (dv_done) prob_q16 <= (dv_q > DW'(16'h8000)) ? 16'h8000 : dv_q[15:0];
    end
  end
endmodule
