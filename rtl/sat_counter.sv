// sat_counter: W-bit up/down saturating counter.
//
// Every cycle the counter moves one step: up when `up` is high, otherwise
// down, and it sticks at 0 and at 2^W-1. It resets to the mid-point 2^(W-1)
// and `above_mid` reports count > 2^(W-1). This is the counter the
// criticality hardware uses for the per-unit arrival/completion monitors and
// for the shader cores' input/output stall monitors; the width default of 8
// and the mid-point initialisation follow the source description. The
// synchronous `clear` back to the mid-point is this design's addition.
// Timing: the new count is visible one cycle after `up` is sampled.
module sat_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         up,
  output logic [W-1:0] count,
  output logic         above_mid
);
  localparam logic [W-1:0] MID = W'(1) << (W - 1);
  localparam logic [W-1:0] MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= MID;
    end else if (clear) begin
      count <= MID;
    end else if (up) begin
      if (count != MAX) count <= count + W'(1);
    end else begin
      if (count != '0) count <= count - W'(1);
    end
  end

  assign above_mid = (count > MID);
endmodule
