// c432_bist_top: built-in self-test response path for the ISCAS 85 c432
// benchmark with a single-output zero-aliasing space compactor.
//
// Data flow, one test pattern per clock while a session runs:
//   pattern source -> mut_in -> (c432, outside this module) -> mut_resp
//   -> fault-injection multiplexers -> space compactor (7 lines to 1)
//   -> signature analyzer (time compactor) -> comparator -> pass / done
// The pattern source is a 36-stage LFSR (mode = 0, pseudorandom testing)
// or an external store of deterministic test vectors addressed by
// pattern_index (mode = 1). The c432 itself is not part of this RTL: its
// inputs and outputs are ports. TREE selects compaction tree #1 or #2;
// both compress the seven outputs into line 436 without losing any single
// stuck-line fault that the chosen test set detects at the c432 outputs.
// With FAULT_INJ = 1 (default), fi_sel places stuck-at faults on the seven
// response lines and fi_int on the compactor lines 433..436 (00/11 pass,
// 01 stuck-at-1, 10 stuck-at-0) to exercise the path in hardware. With
// FAULT_INJ = 0 no multiplexers are built and both selects are ignored.
//
// Timing (see bist_controller): start seen on edge 0 loads the seed and
// clears the signature; patterns 0..N-1 are applied on the following N
// cycles, with mut_resp sampled combinationally through the compactor into
// the signature register on each of those edges; the verdict is captured
// on edge N+1 and done/pass are valid from edge N+2 until the next start.
//
// The structure (pattern generator, module under test, space compactor,
// time compactor, reference signature and comparator) and the two c432
// trees follow the compaction scheme. The 36-stage feedback polynomial
// (x^36 + x^25 + 1), the 16-bit signature polynomial, the controller and
// the port-level interfaces are this design's choices.
module c432_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned       TREE     = 1,
  parameter int unsigned       N_IN     = C432_N_IN,
  parameter int unsigned       N_OUT    = C432_N_OUT,
  parameter int unsigned       SIG_W    = 16,
  parameter logic [SIG_W-1:0]  SIG_POLY = 16'h1021,
  parameter logic [N_IN-1:0]   TPG_TAPS = 36'h801000000,
  parameter int unsigned       CNT_W    = 16,
  parameter bit                FAULT_INJ = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  mode,
  input  logic [CNT_W-1:0]      num_patterns,
  input  logic [N_IN-1:0]       seed,
  input  logic [N_IN-1:0]       ext_pattern,
  output logic [CNT_W-1:0]      pattern_index,
  output logic [N_IN-1:0]       mut_in,
  input  logic [N_OUT-1:0]      mut_resp,
  input  logic [N_OUT-1:0][1:0] fi_sel,
  input  logic [3:0][1:0]       fi_int,
  input  logic [SIG_W-1:0]      ref_signature,
  output logic                  compact_out,
  output logic [SIG_W-1:0]      signature,
  output logic                  busy,
  output logic                  done,
  output logic                  pass
);

  logic            init, apply, check, res_valid;
  logic [N_IN-1:0] tpg_q;
  logic [N_OUT-1:0] resp_fi;
  c432_resp_t      z;
  logic            n433, n434, n435;
  logic            sa_dout;

  bist_controller #(.CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .num_patterns,
    .init, .apply, .pattern_index, .check, .busy, .done
  );

  lfsr_tpg #(.WIDTH(N_IN), .TAPS(TPG_TAPS)) u_tpg (
    .clk, .rst_n,
    .load (init),
    .seed (seed),
    .en   (apply && !mode),
    .q    (tpg_q)
  );

  assign mut_in = mode ? ext_pattern : tpg_q;

  if (FAULT_INJ) begin : g_fi
    fault_inject_mux #(.WIDTH(N_OUT)) u_fi (
      .d   (mut_resp),
      .sel (fi_sel),
      .y   (resp_fi)
    );
  end else begin : g_no_fi
    assign resp_fi = mut_resp;
    logic unused_fi;
    assign unused_fi = ^fi_sel;
  end

  assign z = c432_resp_t'(resp_fi);

  if (TREE == 2) begin : g_tree2
    c432_compactor_t2 #(.FAULT_INJ(FAULT_INJ)) u_cmp (
      .z, .fi_int, .n433, .n434, .n435, .o436(compact_out)
    );
  end else begin : g_tree1
    c432_compactor_t1 #(.FAULT_INJ(FAULT_INJ)) u_cmp (
      .z, .fi_int, .n433, .n434, .n435, .o436(compact_out)
    );
  end

  signature_analyzer #(.WIDTH(SIG_W), .POLY(SIG_POLY)) u_sa (
    .clk, .rst_n,
    .clear     (init),
    .en        (apply),
    .din       (compact_out),
    .dout      (sa_dout),
    .signature (signature)
  );

  signature_comparator #(.WIDTH(SIG_W)) u_cmpr (
    .clk, .rst_n,
    .clear         (init),
    .check         (check),
    .signature     (signature),
    .ref_signature (ref_signature),
    .valid         (res_valid),
    .pass          (pass)
  );

  initial begin
    assert (N_OUT == C432_N_OUT) else $error("c432_bist_top: the c432 compactors take exactly 7 lines");
    assert (TREE == 1 || TREE == 2) else $error("c432_bist_top: TREE must be 1 or 2");
  end

  a_done_valid : assert property (@(posedge clk) disable iff (!rst_n) done |-> res_valid)
    else $error("c432_bist_top: done without a captured verdict");

endmodule
