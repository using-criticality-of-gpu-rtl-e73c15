// tb_pipeline_monitor: a reduced network (2 ROPs, 3 shader cores) is held in
// random high/low arrival and completion patterns long enough for every
// counter to settle; the IOccupancy/AOccupancy/Throughput bits of each unit
// type are then compared with the any/all reduction computed here.
module tb_pipeline_monitor;
  import crit_pkg::*;
  localparam int N_ROP = 2, N_SH = 3, NU = 2 + 2 * N_ROP + N_SH;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] pending [NU], completed [NU], th_in [NUM_UNIT_TYPES], th_out [NUM_UNIT_TYPES];
  unit_stat_t stat [NUM_UNIT_TYPES];
  int checks = 0, failures = 0;
  bit ih [NU], oh [NU];

  pipeline_monitor #(.N_ROP(N_ROP), .N_SH(N_SH)) dut (
    .clk, .rst_n, .clear(1'b0), .pending, .completed, .th_in, .th_out, .stat);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int tix(int i);
    if (i == 0) return 0;
    if (i <= N_ROP) return 1;
    if (i <= N_ROP + N_SH) return 2;
    if (i <= 2 * N_ROP + N_SH) return 3;
    return 4;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NUM_UNIT_TYPES; t++) begin th_in[t] = 8'(4 + t); th_out[t] = 8'(2 + t); end
    for (int i = 0; i < NU; i++) begin pending[i] = '0; completed[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < NU; i++) begin
        // bias towards all-high so that AOccupancy/Throughput also show 1
        ih[i] = (r % 3 == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        oh[i] = (r % 3 == 1) ? 1'b1 : ($urandom_range(0, 3) != 0);
        pending[i]   = ih[i] ? th_in[tix(i)] + 8'd1 : th_in[tix(i)];
        completed[i] = oh[i] ? th_out[tix(i)] + 8'd3 : 8'd0;
      end
      repeat (300) @(posedge clk);
      @(negedge clk);
      for (int t = 0; t < NUM_UNIT_TYPES; t++) begin
        bit eio, eao, eth;
        eio = 0; eao = 1; eth = 1;
        for (int i = 0; i < NU; i++) if (tix(i) == t) begin
          eio |= ih[i]; eao &= ih[i]; eth &= oh[i];
        end
        check(stat[t].io == eio && stat[t].ao == eao && stat[t].th == eth,
              $sformatf("round %0d type %0d: got %b%b%b want %b%b%b", r, t,
                        stat[t].io, stat[t].ao, stat[t].th, eio, eao, eth));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
