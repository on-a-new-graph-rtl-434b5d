// merge_gate: one N-input merger gate of a space-compaction tree.
//
// A compaction tree merges groups of module-under-test output lines into
// one line each, with an AND/NAND, OR/NOR or XOR/XNOR gate chosen per group
// from the lines' compatibility classes. This module is that gate, with the
// gate type a parameter (bist_pkg::gate_e) and the fan-in N a parameter.
// It is purely combinational: y follows a with no clock.
//
// The gate families and their use as line mergers come from the compaction
// method; the defaults (a 2-input XOR, the gate used to merge any remaining
// lines in pairs) are this design's choice.
module merge_gate
  import bist_pkg::*;
#(
  parameter int unsigned N    = 2,
  parameter gate_e       GATE = G_XOR
) (
  input  logic [N-1:0] a,
  output logic         y
);

  always_comb begin
    unique case (GATE)
      G_AND:   y =  (&a);
      G_NAND:  y = ~(&a);
      G_OR:    y =  (|a);
      G_NOR:   y = ~(|a);
      G_XOR:   y =  (^a);
      G_XNOR:  y = ~(^a);
      default: y =  (^a);
    endcase
  end

  initial begin
    assert (N >= 2) else $error("merge_gate: N must be at least 2");
  end

endmodule
