// bist_pkg: types and constants shared by the space-compaction BIST blocks.
//
// gate_e names the six merger gates a compaction tree may use (AND/NAND,
// OR/NOR, XOR/XNOR), as in the mergeability criteria of the compaction
// method. fi_sel_e is the two-bit select of a fault-injection multiplexer:
// 00 and 11 pass the wire, 01 forces stuck-at-1, 10 forces stuck-at-0.
// c432_resp_t bundles the seven primary outputs of the ISCAS 85 c432
// benchmark under their netlist names, first output (223) in the top bit.
package bist_pkg;

  typedef enum logic [2:0] {
    G_AND  = 3'd0,
    G_NAND = 3'd1,
    G_OR   = 3'd2,
    G_NOR  = 3'd3,
    G_XOR  = 3'd4,
    G_XNOR = 3'd5
  } gate_e;

  typedef enum logic [1:0] {
    FI_PASS   = 2'b00,
    FI_SA1    = 2'b01,
    FI_SA0    = 2'b10,
    FI_PASS_B = 2'b11
  } fi_sel_e;

  localparam int unsigned C432_N_IN  = 36;
  localparam int unsigned C432_N_OUT = 7;

  typedef struct packed {
    logic o223;
    logic o329;
    logic o370;
    logic o421;
    logic o430;
    logic o431;
    logic o432;
  } c432_resp_t;

endpackage
