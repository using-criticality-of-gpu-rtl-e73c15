// stream_classifier_3d: criticality bit of a GPU access in a 3D rendering
// workload.
//
// An access is critical when the unit it originates from is bottlenecked and
// the projected frame rate is below the target. Colour accesses come from
// the colour writers (CW), depth accesses from the depth/stencil units (ZS),
// texture and shader accesses from the shader cores with their attached
// texture samplers (SH), blitter accesses from the blitter (BT), and the
// remaining "other" accesses (vertex and index data, etc.) are attributed to
// the front end (FE); that last mapping is this design's reading. Purely
// combinational.
module stream_classifier_3d
  import crit_pkg::*;
(
  input  bneck_t  bneck,
  input  logic    below_target,
  input  stream_e stream,
  output logic    critical
);
  logic src_bneck;

  always_comb begin
    unique case (stream)
      S_COLOR:             src_bneck = bneck.cw;
      S_DEPTH:             src_bneck = bneck.zs;
      S_TEXTURE, S_SHADER: src_bneck = bneck.sh;
      S_BLITTER:           src_bneck = bneck.bt;
      default:             src_bneck = bneck.fe;
    endcase
    critical = below_target && src_bneck;
  end
endmodule
