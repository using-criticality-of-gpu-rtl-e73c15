// gpgpu_classifier: criticality of shader memory accesses in GPGPU
// workloads (two-level algorithm).
//
// Level one: each of the N_CORES shader cores has a shader_stall_monitor;
// every PERIOD cycles it decides whether the core is bottlenecked. Level
// two: each core has a stall_table recording the loads that stall dispatch.
// A miss request leaving core `req_core` for the LLC, issued by the
// load/store at `req_pc`, is critical when the core is bottlenecked and
// either the PC is among the top PCs of the core's stall table, or the PC is
// not in the table and the GPU's LLC miss rate is at most 80%. Every other
// shader access is non-critical and bypasses the LLC on a miss
// (`req_bypass`). The rule follows the source; PERIOD and the miss-rate
// interval are this design's choices. The request side is combinational.
module gpgpu_classifier #(
  parameter int unsigned N_CORES       = 16,
  parameter int unsigned W             = 8,
  parameter int unsigned ENTRIES       = 16,
  parameter int unsigned PC_W          = 32,
  parameter int unsigned PERIOD        = 1024,
  parameter int unsigned MISS_INTERVAL = 65536,
  localparam int unsigned CORE_W       = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // per-core pipeline events
  input  logic [N_CORES-1:0] dispatch_stall,
  input  logic [N_CORES-1:0] commit_none,
  input  logic [N_CORES-1:0] stall_valid,
  input  logic [PC_W-1:0]    stall_pc [N_CORES],
  // GPU LLC lookups, for the miss rate
  input  logic              llc_access,
  input  logic              llc_miss,
  // request being classified
  input  logic [CORE_W-1:0] req_core,
  input  logic [PC_W-1:0]   req_pc,
  output logic              req_critical,
  output logic              req_bypass,
  output logic [N_CORES-1:0] core_bottleneck
);
  localparam int unsigned PW    = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  localparam int unsigned AGE_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [PW-1:0]      tick;
  logic               eval;
  logic [N_CORES-1:0] hit, top;
  logic               rate_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      tick <= '0;
    else if (tick == PW'(PERIOD - 1)) tick <= '0;
    else                             tick <= tick + PW'(1);
  end
  assign eval = (tick == PW'(PERIOD - 1));

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    logic [32 + AGE_W:0] total_unused;
    shader_stall_monitor #(.W(W)) u_mon (
      .clk, .rst_n,
      .dispatch_stall(dispatch_stall[c]),
      .commit_none   (commit_none[c]),
      .eval,
      .bottleneck    (core_bottleneck[c])
    );
    stall_table #(.ENTRIES(ENTRIES), .PC_W(PC_W), .CNT_W(32)) u_tab (
      .clk, .rst_n,
      .stall_valid(stall_valid[c]),
      .stall_pc   (stall_pc[c]),
      .lookup_pc  (req_pc),
      .lookup_hit (hit[c]),
      .lookup_top (top[c]),
      .total_stall(total_unused)
    );
  end

  gpu_miss_rate_monitor #(.INTERVAL(MISS_INTERVAL)) u_rate (
    .clk, .rst_n, .access(llc_access), .miss(llc_miss), .rate_ok
  );

  always_comb begin
    logic b, h, t;
    b = core_bottleneck[req_core];
    h = hit[req_core];
    t = top[req_core];
    req_critical = b && ((h && t) || (!h && rate_ok));
    req_bypass   = !req_critical;
  end
endmodule
