// flow_monitor: request arrival/completion monitor of one pipeline unit
// instance of the rendering queuing network.
//
// Two W-bit saturating counters follow the unit's request flow. C_in counts
// up in a cycle in which the number of pending requests is above th_in and
// down otherwise; C_out counts up in a cycle in which the number of requests
// completed is above th_out and down otherwise. Both start at 2^(W-1). The
// outputs say whether each counter is above that mid-point, which is what the
// occupancy/throughput classification needs. The thresholds are ports
// because the source sets them from the peak bandwidth of each unit, which
// is implementation specific; the 8-bit width of the pending/completed
// counts is this design's choice. Timing: one-cycle update.
module flow_monitor #(
  parameter int unsigned W     = 8,
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [CNT_W-1:0] pending,    // requests pending at the unit now
  input  logic [CNT_W-1:0] completed,  // requests completed this cycle
  input  logic [CNT_W-1:0] th_in,
  input  logic [CNT_W-1:0] th_out,
  output logic             in_high,    // C_in  > 2^(W-1)
  output logic             out_high,   // C_out > 2^(W-1)
  output logic [W-1:0]     c_in,
  output logic [W-1:0]     c_out
);
  sat_counter #(.W(W)) u_cin (
    .clk, .rst_n, .clear,
    .up(pending > th_in), .count(c_in), .above_mid(in_high)
  );

  sat_counter #(.W(W)) u_cout (
    .clk, .rst_n, .clear,
    .up(completed > th_out), .count(c_out), .above_mid(out_high)
  );
endmodule
