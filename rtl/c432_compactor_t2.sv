// c432_compactor_t2: zero-aliasing space compactor #2 for the c432 benchmark.
//
// The alternative tree with the same single-output compaction ratio (1/7):
//   433 = OR(223, 329, 370, 431)    one OR-compatible class merged first
//   434 = XOR(421, 430)
//   435 = XOR(432, 433)
//   436 = XOR(434, 435)             the single compacted output
// Lines 421, 430 and 432 reach 436 through XOR gates only, so a single
// error on any of them always reaches the output.
//
// Interface and timing are those of c432_compactor_t1: z in, the internal
// lines 433-435 and the output 436 out, optional fault injection on lines
// 433-436 through fi_int when FAULT_INJ = 1, purely combinational.
module c432_compactor_t2
  import bist_pkg::*;
#(
  parameter bit FAULT_INJ = 1'b0
) (
  input  c432_resp_t      z,
  input  logic [3:0][1:0] fi_int,
  output logic            n433,
  output logic            n434,
  output logic            n435,
  output logic            o436
);

  // Gate outputs before fault injection, lines 433..436.
  logic g433, g434, g435, g436;

  merge_gate #(.N(4), .GATE(G_OR)) u433 (.a({z.o223, z.o329, z.o370, z.o431}), .y(g433));
  merge_gate #(.N(2), .GATE(G_XOR)) u434 (.a({z.o421, z.o430}), .y(g434));
  merge_gate #(.N(2), .GATE(G_XOR)) u435 (.a({z.o432, n433}), .y(g435));
  merge_gate #(.N(2), .GATE(G_XOR)) u436 (.a({n434, n435}), .y(g436));

  if (FAULT_INJ) begin : g_fi
    fault_inject_mux fi433 (.d(g433), .sel(fi_int[0]), .y(n433));
    fault_inject_mux fi434 (.d(g434), .sel(fi_int[1]), .y(n434));
    fault_inject_mux fi435 (.d(g435), .sel(fi_int[2]), .y(n435));
    fault_inject_mux fi436 (.d(g436), .sel(fi_int[3]), .y(o436));
  end else begin : g_no_fi
    assign n433 = g433;
    assign n434 = g434;
    assign n435 = g435;
    assign o436 = g436;
    logic unused_fi;
    assign unused_fi = ^fi_int;
  end

endmodule
