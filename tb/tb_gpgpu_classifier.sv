// tb_gpgpu_classifier: four shader cores, evaluation period 16, miss-rate
// interval 64. Core 0 is driven into the bottlenecked state and core 1 kept
// free; core 0's stall table gets one dominant load PC (A), two minor ones
// (B, C). The request classification is then checked for A (top PC:
// critical), B (in the table but outside the top 90%: non-critical), an
// unknown PC under low and under high GPU LLC miss rate (critical only when
// the miss rate is at most 80%), and any PC of the free core (never
// critical). Bypass must be the complement of critical.
module tb_gpgpu_classifier;
  localparam int NC = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0] dispatch_stall = '0, commit_none = '0, stall_valid = '0, core_bottleneck;
  logic [31:0] stall_pc [NC];
  logic llc_access = 1'b0, llc_miss = 1'b0;
  logic [1:0] req_core = '0;
  logic [31:0] req_pc = '0;
  logic req_critical, req_bypass;
  int checks = 0, failures = 0;

  gpgpu_classifier #(.N_CORES(NC), .PERIOD(16), .MISS_INTERVAL(64)) dut (
    .clk, .rst_n, .dispatch_stall, .commit_none, .stall_valid, .stall_pc,
    .llc_access, .llc_miss, .req_core, .req_pc, .req_critical, .req_bypass, .core_bottleneck);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ask(int core, logic [31:0] pc, bit exp_c, string what);
    req_core = 2'(core);
    req_pc   = pc;
    #1;
    check(req_critical == exp_c, $sformatf("%s: critical=%0d want %0d", what, req_critical, exp_c));
    check(req_bypass == !exp_c, $sformatf("%s: bypass", what));
  endtask

  task automatic stall(logic [31:0] pc, int n);
    for (int i = 0; i < n; i++) begin
      stall_valid[0] = 1'b1;
      stall_pc[0]    = pc;
      @(negedge clk);
    end
    stall_valid[0] = 1'b0;
  endtask

  task automatic miss_phase(bit high);
    for (int i = 0; i < 130; i++) begin
      llc_access = 1'b1;
      llc_miss   = high ? 1'b1 : (i % 4 == 0);
      @(negedge clk);
    end
    llc_access = 1'b0;
    llc_miss   = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) stall_pc[c] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // before any stall history nothing is bottlenecked
    ask(0, 32'hA0, 1'b0, "idle core 0");
    // core 0: stalls on dispatch and commits nothing; core 1: fine
    dispatch_stall = 4'b0001;
    commit_none    = 4'b0001;
    stall(32'hA0, 90);
    stall(32'hB0, 5);
    stall(32'hC0, 5);
    repeat (40) @(negedge clk);
    check(core_bottleneck == 4'b0001, $sformatf("bottleneck vector %b", core_bottleneck));
    miss_phase(1'b0);                         // miss rate 25%
    ask(0, 32'hA0, 1'b1, "top PC on bottlenecked core");
    ask(0, 32'hB0, 1'b0, "non-top PC in table");
    ask(0, 32'hD0, 1'b1, "unknown PC, low miss rate");
    ask(1, 32'hA0, 1'b0, "free core");
    miss_phase(1'b1);                         // miss rate 100%
    ask(0, 32'hD0, 1'b0, "unknown PC, high miss rate");
    ask(0, 32'hA0, 1'b1, "top PC, high miss rate");
    // core 0 recovers
    dispatch_stall = '0;
    commit_none    = '0;
    repeat (300) @(negedge clk);
    check(core_bottleneck == 4'b0000, "recovered");
    ask(0, 32'hA0, 1'b0, "top PC on recovered core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
