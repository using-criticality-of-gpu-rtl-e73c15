// tb_stream_classifier_3d: exhaustive check of the stream-to-unit mapping:
// every stream, every bottleneck vector and both frame-rate states.
module tb_stream_classifier_3d;
  import crit_pkg::*;
  bneck_t  bneck;
  logic    below_target, critical;
  stream_e stream;
  int checks = 0, failures = 0;

  stream_classifier_3d dut (.bneck, .below_target, .stream, .critical);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 32; b++)
      for (int t = 0; t < 2; t++)
        for (int s = 0; s < 6; s++) begin
          bit e;
          bneck = bneck_t'(b);
          below_target = t[0];
          stream = stream_e'(s);
          #1;
          case (s)
            0: e = b[3];          // colour   -> CW
            1: e = b[2];          // texture  -> SH
            2: e = b[1];          // depth    -> ZS
            3: e = b[4];          // blitter  -> BT
            4: e = b[0];          // other    -> FE
            default: e = b[2];    // shader   -> SH
          endcase
          e = e & t[0];
          checks++;
          if (critical !== e) begin
            failures++;
            $display("FAIL: b=%b t=%0d s=%0d got %0d", b[4:0], t, s, critical);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
