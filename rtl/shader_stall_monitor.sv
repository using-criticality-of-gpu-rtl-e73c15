// shader_stall_monitor: bottleneck detector of one shader core running a
// GPGPU kernel (first level of the GPGPU criticality algorithm).
//
// InputStall counts up in a cycle in which the core's front end could not
// dispatch any warp because of pending source operands and down otherwise;
// OutputStall counts up in a cycle in which the back end committed no
// instruction and down otherwise. Both are W-bit saturating counters that
// start at 2^(W-1). The core is bottlenecked when both are above 2^(W-1).
// As the source invokes this check periodically, `bottleneck` is sampled
// when `eval` is high and held in between. Timing: registered output,
// updated the cycle after `eval`.
module shader_stall_monitor #(
  parameter int unsigned W = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dispatch_stall,   // no warp dispatched: operands pending
  input  logic commit_none,      // no instruction committed this cycle
  input  logic eval,
  output logic bottleneck
);
  logic [W-1:0] in_cnt, out_cnt;
  logic         in_high, out_high;

  sat_counter #(.W(W)) u_in (
    .clk, .rst_n, .clear(1'b0), .up(dispatch_stall), .count(in_cnt), .above_mid(in_high)
  );
  sat_counter #(.W(W)) u_out (
    .clk, .rst_n, .clear(1'b0), .up(commit_none), .count(out_cnt), .above_mid(out_high)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bottleneck <= 1'b0;
    else if (eval) bottleneck <= in_high && out_high;
  end
endmodule
