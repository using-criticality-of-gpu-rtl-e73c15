// gpu_miss_rate_monitor: LLC miss rate of GPU accesses, measured over fixed
// intervals.
//
// Counts GPU LLC lookups and misses over INTERVAL cycles. At the end of each
// interval `rate_ok` is set when the interval's miss rate was at most 80%
// (5 * misses <= 4 * accesses; an interval without accesses counts as ok) and
// the counters restart. The 80% bound follows the source; the interval
// length and the reset value (ok) are this design's choice. Timing:
// `rate_ok` changes the cycle after the last cycle of an interval.
module gpu_miss_rate_monitor #(
  parameter int unsigned INTERVAL = 65536,
  parameter int unsigned CNT_W    = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic access,
  input  logic miss,
  output logic rate_ok
);
  localparam int unsigned IW = (INTERVAL > 1) ? $clog2(INTERVAL) : 1;

  logic [IW-1:0]    tick;
  logic [CNT_W-1:0] acc_cnt, miss_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick     <= '0;
      acc_cnt  <= '0;
      miss_cnt <= '0;
      rate_ok  <= 1'b1;
    end else begin
      logic [CNT_W-1:0] a, m;
      a = acc_cnt  + CNT_W'(access);
      m = miss_cnt + CNT_W'(access && miss);
      if (tick == IW'(INTERVAL - 1)) begin
        tick     <= '0;
        rate_ok  <= ((CNT_W + 3)'(m) * 5 <= (CNT_W + 3)'(a) * 4);
        acc_cnt  <= '0;
        miss_cnt <= '0;
      end else begin
        tick     <= tick + IW'(1);
        acc_cnt  <= a;
        miss_cnt <= m;
      end
    end
  end
endmodule
