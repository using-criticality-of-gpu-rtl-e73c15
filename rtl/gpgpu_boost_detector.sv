// gpgpu_boost_detector: detects memory-sensitive phases of a GPGPU
// workload, during which every GPU access is given the highest priority.
//
// Time is cut into windows of WINDOW GPU cycles (100K in the source) in
// which the shader instructions retired are counted. Every PROBE_EVERY
// windows the detector raises `boost` for one window. If the instructions
// retired in a boosted window exceed those of the window before it, `boost`
// stays on for the next window, and so on; as soon as a boosted window does
// no better than the one before, `boost` drops. The comparison rule and the
// window length follow the source; how often a probe is started is this
// design's choice. Only active while `enable` (GPGPU workload) is high.
module gpgpu_boost_detector #(
  parameter int unsigned WINDOW      = 100000,
  parameter int unsigned PROBE_EVERY = 10,
  parameter int unsigned RET_W       = 8,
  parameter int unsigned CNT_W       = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [RET_W-1:0] retired,     // instructions retired this cycle
  output logic             boost,
  output logic             window_end
);
  localparam int unsigned WW = (WINDOW > 1) ? $clog2(WINDOW) : 1;
  localparam int unsigned PW = (PROBE_EVERY > 1) ? $clog2(PROBE_EVERY) : 1;

  logic [WW-1:0]    tick;
  logic [CNT_W-1:0] cur, last;
  logic [PW-1:0]    since;

  assign window_end = (tick == WW'(WINDOW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick  <= '0;
      cur   <= '0;
      last  <= '0;
      since <= '0;
      boost <= 1'b0;
    end else if (!enable) begin
      tick  <= '0;
      cur   <= '0;
      since <= '0;
      boost <= 1'b0;
    end else begin
      logic [CNT_W-1:0] c;
      c = cur + CNT_W'(retired);
      if (window_end) begin
        tick <= '0;
        cur  <= '0;
        last <= c;
        if (boost) begin
          boost <= (c > last);
          since <= '0;
        end else if (since == PW'(PROBE_EVERY - 1)) begin
          boost <= 1'b1;
          since <= '0;
        end else begin
          since <= since + PW'(1);
        end
      end else begin
        tick <= tick + WW'(1);
        cur  <= c;
      end
    end
  end
endmodule
