// fault_inject_mux: hardware stuck-at fault injection on a bundle of wires.
//
// Each wire gets a three-way multiplexer between the wire itself, logic 1
// and logic 0, so that a single stuck-at fault can be placed on any line
// of a circuit under test while it runs. Per wire, the two-bit select
// (bist_pkg::fi_sel_e) means 00 = normal, 01 = stuck-at-1, 10 = stuck-at-0,
// 11 = normal again; this encoding is the one of the fault-injection test
// set-up. WIDTH wires are handled side by side, each with its own select
// (WIDTH = 1 is the single-wire multiplexer). Purely combinational.
module fault_inject_mux
  import bist_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0]      d,
  input  logic [WIDTH-1:0][1:0] sel,
  output logic [WIDTH-1:0]      y
);

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      unique case (fi_sel_e'(sel[i]))
        FI_SA1:  y[i] = 1'b1;
        FI_SA0:  y[i] = 1'b0;
        default: y[i] = d[i];
      endcase
    end
  end

endmodule
