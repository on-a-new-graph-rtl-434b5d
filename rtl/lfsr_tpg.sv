// lfsr_tpg: linear feedback shift register used as a pseudorandom test
// pattern generator.
//
// Stage q[0] is Q1, q[1] is Q2 and so on. On each enabled clock every
// stage passes its bit to the next one (Q1 -> Q2 -> Q3 ...) and Q1 takes
// the XOR of the stages marked in TAPS. With a primitive feedback
// polynomial and any non-zero seed the register runs through all 2^WIDTH-1
// non-zero states before repeating; the all-zero state locks up and is
// flagged by an assertion.
//
// Defaults reproduce the three-stage generator of the compaction work:
// feedback Q1 <= Q2 xor Q3 and seed 111, which gives the sequence
// 111, 011, 001, 100, 010, 101, 110 (Q1 Q2 Q3) and repeats after 7 clocks.
// Wider generators (the c432 BIST uses 36 stages) take their taps from a
// table of primitive polynomials; the load/enable handshake and the reset
// to RESET_SEED are this design's choices.
//
// Interface: load (priority) copies seed into the register, en advances it
// one step; q is the registered state, valid from the clock edge.
module lfsr_tpg #(
  parameter int unsigned     WIDTH      = 3,
  parameter logic [WIDTH-1:0] TAPS      = 3'b110,
  parameter logic [WIDTH-1:0] RESET_SEED = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] q_next;

  always_comb begin
    q_next[0] = ^(q & TAPS);
    for (int unsigned i = 1; i < WIDTH; i++) q_next[i] = q[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= RESET_SEED;
    end else if (load) begin
      q <= seed;
    end else if (en) begin
      q <= q_next;
    end
  end

  // A zero state never leaves zero: the generator would stop producing patterns.
  a_nonzero : assert property (@(posedge clk) disable iff (!rst_n) q != '0)
    else $error("lfsr_tpg: register is all zero (zero seed loaded)");

endmodule
