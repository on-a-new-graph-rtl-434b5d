// c432_compactor_t1: zero-aliasing space compactor #1 for the c432 benchmark.
//
// Compresses the seven c432 outputs into a single line in two levels:
//   433 = AND(223, 329, 370, 430)   one AND-compatible class merged first
//   434 = XOR(431, 432)
//   435 = OR(421, 433)
//   436 = XOR(434, 435)             the single compacted output
// The net names are the line numbers the compaction method assigned; the
// gates and their connections are those of compaction tree #1. Because
// 431 and 432 reach 436 only through XOR gates, any single error on either
// line always reaches the output.
//
// Interface: z is the c432 response (bist_pkg::c432_resp_t), o436 the
// compacted bit; the internal lines 433-435 are brought out for
// observation. With FAULT_INJ = 1 each of the lines 433, 434, 435, 436
// (fi_int[0] .. fi_int[3]) passes through a fault-injection multiplexer
// (00/11 pass, 01 stuck-at-1, 10 stuck-at-0) so that stuck-at faults in the
// compactor itself can be placed in hardware; with the default
// FAULT_INJ = 0 the multiplexers are not built and fi_int is ignored.
// Purely combinational.
module c432_compactor_t1
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

  merge_gate #(.N(4), .GATE(G_AND)) u433 (.a({z.o223, z.o329, z.o370, z.o430}), .y(g433));
  merge_gate #(.N(2), .GATE(G_XOR)) u434 (.a({z.o431, z.o432}), .y(g434));
  merge_gate #(.N(2), .GATE(G_OR)) u435 (.a({z.o421, n433}), .y(g435));
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
