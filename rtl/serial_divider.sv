// serial_divider: unsigned restoring divider, one quotient bit per cycle.
//
// Pulse `start` with the operands; W cycles later `done` pulses for one cycle
// with `quotient` and `remainder` valid, and they hold until the next start.
// `busy` is high in between and `start` is ignored while busy. Division by
// zero returns an all-ones quotient and the dividend as remainder. The
// estimators need only a few divisions per estimate, so a small iterative
// divider is used rather than a combinational one; this is this design's
// implementation choice.
module serial_divider #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  dvs;
  logic [W:0]    rem;
  logic [W-1:0]  quo;
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvs       <= '0;
      rem       <= '0;
      quo       <= '0;
      left      <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dvs  <= divisor;
          rem  <= '0;
          quo  <= dividend;
          left <= CW'(W);
          busy <= 1'b1;
        end
      end else begin
        logic [W:0] trial;
        trial = {rem[W-1:0], quo[W-1]};
        if (trial >= {1'b0, dvs}) begin
          rem <= trial - {1'b0, dvs};
          quo <= {quo[W-2:0], 1'b1};
        end else begin
          rem <= trial;
          quo <= {quo[W-2:0], 1'b0};
        end
        left <= left - CW'(1);
        if (left == CW'(1)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          if (trial >= {1'b0, dvs}) begin
            quotient  <= {quo[W-2:0], 1'b1};
            remainder <= W'(trial - {1'b0, dvs});
          end else begin
            quotient  <= {quo[W-2:0], 1'b0};
            remainder <= W'(trial);
          end
        end
      end
    end
  end
endmodule
