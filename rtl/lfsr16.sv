// lfsr16: 16-bit maximal-length Galois LFSR (taps 16, 14, 13, 11) giving
// one pseudo-random 16-bit value per cycle when `en` is high. Used for the
// probabilistic decisions of the DRAM scheduler. Never reaches zero; the
// seed parameter must be non-zero.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  value <= SEED;
    else if (en) value <= {1'b0, value[15:1]} ^ (value[0] ? 16'hB400 : 16'h0000);
  end
endmodule
