// tb_rtp_table: a 4-entry table receives random records; reads of every
// entry, the accumulation of all records beyond the third into the last
// entry, the record count, the running sums and clearing are compared with
// a reference kept here.
module tb_rtp_table;
  localparam int E = 4;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, rec_valid = 1'b0;
  logic [31:0] rec_updates = '0, rec_cycles = '0, rec_tiles = '0;
  logic [1:0] rd_idx = '0;
  logic rd_valid;
  logic [31:0] rd_updates, rd_cycles, rd_tiles, count, sum_updates, sum_cycles;
  int checks = 0, failures = 0;
  longint mu [E], mc [E], mt [E];
  int mn;
  longint su, sc;

  rtp_table #(.ENTRIES(E)) dut (.clk, .rst_n, .clear, .rec_valid, .rec_updates, .rec_cycles, .rec_tiles,
    .rd_idx, .rd_valid, .rd_updates, .rd_cycles, .rd_tiles, .count, .sum_updates, .sum_cycles);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 20; f++) begin
      int nrec;
      // clear at frame start
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      mn = 0; su = 0; sc = 0;
      for (int i = 0; i < E; i++) begin mu[i] = 0; mc[i] = 0; mt[i] = 0; end
      nrec = $urandom_range(1, 9);
      for (int r = 0; r < nrec; r++) begin
        int k;
        rec_valid   = 1'b1;
        rec_updates = $urandom_range(1, 1000);
        rec_cycles  = $urandom_range(1, 100000);
        rec_tiles   = $urandom_range(1, 320);
        k = (mn >= E - 1) ? E - 1 : mn;
        mu[k] += rec_updates; mc[k] += rec_cycles; mt[k] += rec_tiles;
        mn++; su += rec_updates; sc += rec_cycles;
        @(negedge clk);
        rec_valid = 1'b0;
        if ($urandom_range(0, 1) == 1) @(negedge clk);
      end
      check(count == 32'(mn) && sum_updates == 32'(su) && sum_cycles == 32'(sc), "count/sums");
      for (int i = 0; i < E; i++) begin
        rd_idx = 2'(i);
        #1;
        check(rd_valid == (i < mn), $sformatf("valid %0d", i));
        check(rd_updates == 32'(mu[i]) && rd_cycles == 32'(mc[i]) && rd_tiles == 32'(mt[i]),
              $sformatf("frame %0d entry %0d", f, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
