// tb_workload_3d_bottleneck: the request flow monitors of the full
// rendering queuing network (98 units: FE, 16 ZS, 64 shader cores, 16 CW,
// BT), the bottleneck search and the stream classifier, all at their default
// sizes, watching a flow model of a frame being rendered.
//
// The model moves work through the pipeline in the order of the current
// depth test: FE, ZS, SH, CW with early Z, or FE, SH, ZS, CW with late Z.
// Every unit instance has a 16-entry input queue and a peak rate per cycle:
// 64 for FE, 4 per ZS and CW unit, 1 per shader core, so the peak flow is
// 64 per cycle at every stage. FE always has work. A unit only completes
// what the next stage has room for, and completions are spread round-robin
// over the next stage's instances; the blitter is idle. The monitors'
// thresholds are half of the queue (occupancy) and half of the peak rate
// (throughput).
//
// One scenario makes one unit type slow: each of its request slots is
// served with probability 0.4 per cycle, as when its memory accesses take
// long. Units in front of it then fill up and are held back, and units
// behind it run dry. For each order and each slow type (or none), after the
// monitors settle, the bottleneck vector must name the slow type (a slow
// FE marks ZS and SH as well, as the search does), and with the frame rate
// below target the classifier must mark exactly the streams of the marked
// units critical: color for CW, depth for ZS, texture and shader for SH,
// other for FE.
module tb_workload_3d_bottleneck;
  import crit_pkg::*;
  localparam int N_ROP = 16, N_SH = 64, NU = 2 + 2 * N_ROP + N_SH, Q = 16;
  localparam int ZS0 = 1, SH0 = 1 + N_ROP, CW0 = 1 + N_ROP + N_SH, BTI = NU - 1;
  localparam int SETTLE = 6000;

  logic clk = 1'b0, rst_n = 1'b0, early_z = 1'b1, below_target = 1'b1;
  logic [7:0] pending [NU], completed [NU];
  logic [7:0] th_in [NUM_UNIT_TYPES], th_out [NUM_UNIT_TYPES];
  unit_stat_t stat [NUM_UNIT_TYPES];
  bneck_t bneck;
  logic update;
  stream_e stream = S_COLOR;
  logic critical;
  int checks = 0, failures = 0;

  pipeline_monitor u_mon (.clk, .rst_n, .clear(1'b0), .pending, .completed, .th_in, .th_out, .stat);
  bottleneck_finder u_bf (.clk, .rst_n, .early_z, .stat, .bneck, .update);
  stream_classifier_3d u_cls (.bneck, .below_target, .stream, .critical);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2 * 5 * SETTLE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q [NU];
  int rr [NUM_UNIT_TYPES];

  function automatic int first_of(unit_e t);
    case (t)
      U_FE:    return 0;
      U_ZS:    return ZS0;
      U_SH:    return SH0;
      U_CW:    return CW0;
      default: return BTI;
    endcase
  endfunction

  function automatic int count_of(unit_e t);
    return (t == U_ZS || t == U_CW) ? N_ROP : (t == U_SH) ? N_SH : 1;
  endfunction

  function automatic int peak_of(unit_e t);
    return (t == U_FE) ? 64 : (t == U_SH) ? 1 : 4;
  endfunction

  // One cycle of the flow model, back to front. `slow` is the slow type,
  // U_BT for none.
  task automatic step(unit_e order [4], unit_e slow);
    for (int i = 0; i < NU; i++) completed[i] = 8'd0;
    for (int s = 3; s >= 0; s--) begin
      unit_e t;
      int f, n, p;
      t = order[s];
      f = first_of(t);
      n = count_of(t);
      p = peak_of(t);
      for (int k = 0; k < n; k++) begin
        int i, serve;
        i = f + k;
        serve = 0;
        for (int u = 0; u < p; u++)
          if (t != slow || $urandom_range(0, 9) < 4) serve++;
        if (t != U_FE && serve > q[i]) serve = q[i];
        // room downstream
        if (s < 3) begin
          unit_e d;
          int df, dn, moved;
          d  = order[s + 1];
          df = first_of(d);
          dn = count_of(d);
          moved = 0;
          for (int m = 0; m < serve; m++) begin
            bit placed;
            placed = 0;
            for (int a = 0; a < dn && !placed; a++) begin
              int j;
              j = df + (rr[d] + a) % dn;
              if (q[j] < Q) begin
                q[j]++;
                rr[d] = (rr[d] + a + 1) % dn;
                placed = 1;
              end
            end
            if (placed) moved++;
          end
          serve = moved;
        end
        if (t != U_FE) q[i] -= serve;
        completed[i] = 8'(serve);
      end
    end
    for (int i = 0; i < NU; i++) pending[i] = 8'((i == 0) ? Q : q[i]);
  endtask

  function automatic bneck_t expect_of(unit_e slow);
    bneck_t b;
    b = '0;
    case (slow)
      U_FE: begin b.fe = 1; b.zs = 1; b.sh = 1; end
      U_ZS: b.zs = 1;
      U_SH: b.sh = 1;
      U_CW: b.cw = 1;
      default: ;
    endcase
    return b;
  endfunction

  initial begin
    unit_e orders [2][4] = '{'{U_FE, U_ZS, U_SH, U_CW}, '{U_FE, U_SH, U_ZS, U_CW}};
    unit_e slows [5] = '{U_BT, U_FE, U_ZS, U_SH, U_CW};
    int n_crit, n_noncrit;
    n_crit = 0;
    n_noncrit = 0;
    for (int t = 0; t < NUM_UNIT_TYPES; t++) begin
      th_in[t]  = 8'(Q / 2);
      th_out[t] = 8'(peak_of(unit_e'(t)) / 2);
      rr[t] = 0;
    end
    for (int i = 0; i < NU; i++) begin q[i] = 0; pending[i] = '0; completed[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < 2; o++) begin
      early_z = (o == 0);
      for (int sc = 0; sc < 5; sc++) begin
        bneck_t exp_b;
        exp_b = expect_of(slows[sc]);
        for (int i = 0; i < NU; i++) q[i] = 0;       // a new draw batch
        for (int c = 0; c < SETTLE; c++) begin
          step(orders[o], slows[sc]);
          @(negedge clk);
        end
        check(bneck == exp_b, $sformatf("%s-Z, slow %s: bottleneck vector %b, want %b",
              early_z ? "early" : "late", sc == 0 ? "none" : slows[sc].name(), bneck, exp_b));
        for (int s = 0; s <= int'(S_SHADER); s++) begin
          bit exp_c;
          stream = stream_e'(s);
          case (stream)
            S_COLOR:             exp_c = exp_b.cw;
            S_DEPTH:             exp_c = exp_b.zs;
            S_TEXTURE, S_SHADER: exp_c = exp_b.sh;
            S_BLITTER:           exp_c = exp_b.bt;
            default:             exp_c = exp_b.fe;
          endcase
          #1;
          check(critical == exp_c, $sformatf("stream %s critical %0d, want %0d", stream.name(), critical, exp_c));
          if (exp_c) n_crit++; else n_noncrit++;
        end
      end
    end
    check(n_crit > 0 && n_noncrit > 0, "critical and non-critical streams seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
