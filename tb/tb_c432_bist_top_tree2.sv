// tb_c432_bist_top_tree2: the end-to-end test of tb_c432_bist_top, run
// with compaction tree #2 selected (TREE = 2); all other parameters at
// their defaults. A second instance with FAULT_INJ = 0 runs alongside and
// must give the fault-free result in every session.
//
// The c432 is played by c432_resp_model (the 51 recorded responses, plus a
// stand-in function for other vectors). A deterministic vector store
// answers pattern_index with the recorded vectors. For every session the
// testbench predicts, on its own, the pattern sequence, the compacted bit
// of each pattern (tree #2 written as a parity condition), the signature (by
// linearity: XOR of X^i mod h(X) over the 1-bits of the stream) and the
// verdict, and checks them together with the session timing (done N+2
// clock edges after start).
//
// Sessions: the full 51-vector deterministic test fault-free (pass) and
// against a wrong reference (fail); every single stuck-at fault on the 7
// response lines, injected through fi_sel, and on the 4 compactor lines
// 433..436, injected through fi_int, against the fault-free reference;
// pseudorandom sessions with and without a fault; a restart
// from done and mode switches. Each mechanism is counted and must occur.
module tb_c432_bist_top_tree2;
  import bist_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam logic [15:0] POLY = 16'h1021;

  logic             rst_n, start, mode;
  logic [15:0]      num_patterns, pattern_index;
  logic [35:0]      seed, ext_pattern, mut_in;
  logic [6:0]       mut_resp;
  logic [6:0][1:0]  fi_sel;
  logic [3:0][1:0]  fi_int;
  logic [15:0]      ref_signature, signature;
  logic             compact_out, busy, done, pass;
  logic             hit;

  c432_bist_top #(.TREE(2)) dut (
    .clk, .rst_n, .start, .mode, .num_patterns, .seed, .ext_pattern, .pattern_index,
    .mut_in, .mut_resp, .fi_sel, .fi_int, .ref_signature, .compact_out, .signature, .busy, .done, .pass
  );

  c432_resp_model mut (.x(mut_in), .z(mut_resp), .hit);

  // A second top built without fault-injection multiplexers, fed the same
  // inputs and the same responses: the fault selects must have no effect
  // on it, so it must always behave as the fault-free circuit.
  logic [15:0]      nf_index, nf_signature;
  logic [35:0]      nf_mut_in;
  logic             nf_compact, nf_busy, nf_done, nf_pass;

  c432_bist_top #(.TREE(2), .FAULT_INJ(1'b0)) dut_nofi (
    .clk, .rst_n, .start, .mode, .num_patterns, .seed, .ext_pattern, .pattern_index(nf_index),
    .mut_in(nf_mut_in), .mut_resp, .fi_sel, .fi_int, .ref_signature, .compact_out(nf_compact),
    .signature(nf_signature), .busy(nf_busy), .done(nf_done), .pass(nf_pass)
  );

  logic [43:0] table51 [0:50];
  initial $readmemh("tb/c432_table51.hex", table51);
  assign ext_pattern = (pattern_index < 16'd51) ? table51[pattern_index][42:7] : '0;

  // Mechanism counters.
  int n_det = 0, n_prpg = 0, n_sa0 = 0, n_sa1 = 0, n_int = 0, n_pass = 0, n_fail = 0;
  int n_restart = 0, n_mode_switch = 0, n_table_hits = 0;
  logic last_mode = 1'b0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Tree #2 gate by gate; il = 0..3 forces line 433+il to fv, il < 0 is
  // fault-free. Returns line 436.
  function automatic logic tree2(logic [6:0] v, int il = -1, logic fv = 1'b0);
    // v[6]=223 v[5]=329 v[4]=370 v[3]=421 v[2]=430 v[1]=431 v[0]=432
    logic [3:0] n;
    n[0] = v[6] | v[5] | v[4] | v[1];
    if (il == 0) n[0] = fv;
    n[1] = v[3] ^ v[2];
    if (il == 1) n[1] = fv;
    n[2] = v[0] ^ n[0];
    if (il == 2) n[2] = fv;
    n[3] = n[1] ^ n[2];
    if (il == 3) n[3] = fv;
    return n[3];
  endfunction

  function automatic logic [6:0] stand_in(logic [35:0] x);
    logic [6:0] z;
    for (int k = 0; k < 7; k++) begin
      logic p;
      p = (k % 2 == 1);
      for (int i = k; i < 36; i += 7) p ^= x[i];
      z[6-k] = p;
    end
    return z;
  endfunction

  function automatic logic [15:0] x_pow_mod(int i);
    logic [15:0] r;
    r = 16'h0001;
    for (int k = 0; k < i; k++) begin
      logic top;
      top = r[15];
      r = {r[14:0], 1'b0};
      if (top) r ^= POLY;
    end
    return r;
  endfunction

  // Predicted signature of a session: the first bit applied has the
  // highest power, X^(n-1).
  function automatic logic [15:0] predict(logic md, int n, logic [35:0] sd, int line, int sv);
    logic [35:0] pat, lf;
    logic [6:0]  resp;
    logic [15:0] sig;
    sig = '0;
    lf = sd;
    for (int k = 0; k < n; k++) begin
      pat = md ? table51[k][42:7] : lf;
      resp = md ? table51[k][6:0] : stand_in(pat);
      if (line >= 0 && line < 7) resp[line] = sv[0];
      if (tree2(resp, line - 7, sv[0])) sig ^= x_pow_mod(n - 1 - k);
      lf = {lf[34:0], lf[35] ^ lf[24]};
    end
    return sig;
  endfunction

  // One session. line < 0 means no fault, 0..6 a response line (bit
  // position in mut_resp), 7..10 the compactor lines 433..436; sv is the
  // stuck value.
  task automatic session(string name, logic md, int n, logic [35:0] sd, int line, int sv,
                         logic [15:0] ref_sig, logic [15:0] exp_sig);
    logic [35:0] lf;
    logic exp_pass;
    logic [15:0] nf_sig;
    nf_sig = predict(md, n, sd, -1, 0);
    if (md != last_mode) n_mode_switch++;
    last_mode = md;
    if (done) n_restart++;
    mode = md;
    num_patterns = 16'(n);
    seed = sd;
    ref_signature = ref_sig;
    fi_sel = '0;
    fi_int = '0;
    if (line >= 7) begin
      fi_int[line - 7] = (sv == 1) ? FI_SA1 : FI_SA0;
      n_int++;
    end else if (line >= 0) begin
      fi_sel[line] = (sv == 1) ? FI_SA1 : FI_SA0;
    end
    if (line >= 0) begin
      if (sv == 1) n_sa1++; else n_sa0++;
    end
    if (md) n_det++; else n_prpg++;
    start = 1;
    @(posedge clk); #1 start = 0;
    lf = sd;
    for (int k = 0; k < n; k++) begin
      logic [35:0] pat;
      logic [6:0]  resp;
      pat = md ? table51[k][42:7] : lf;
      resp = md ? table51[k][6:0] : stand_in(pat);
      if (line >= 0 && line < 7) resp[line] = sv[0];
      if (hit) n_table_hits++;
      check($sformatf("%s: pattern %0d busy, not done", name, k), busy && !done);
      check($sformatf("%s: pattern %0d index", name, k), pattern_index == 16'(k));
      check($sformatf("%s: pattern %0d applied %h expected %h", name, k, mut_in, pat), mut_in == pat);
      check($sformatf("%s: pattern %0d compacted bit", name, k), compact_out == tree2(resp, line - 7, sv[0]));
      check($sformatf("%s: pattern %0d without injection hardware", name, k),
            nf_mut_in == pat && nf_index == pattern_index && nf_busy == busy
            && nf_compact == tree2(md ? table51[k][6:0] : stand_in(pat)));
      lf = {lf[34:0], lf[35] ^ lf[24]};
      @(posedge clk); #1;
    end
    check($sformatf("%s: check cycle, not yet done", name), busy && !done);
    @(posedge clk); #1;
    exp_pass = (exp_sig == ref_sig);
    check($sformatf("%s: done N+2 edges after start", name), done && !busy);
    check($sformatf("%s: signature %h expected %h", name, signature, exp_sig), signature == exp_sig);
    check($sformatf("%s: verdict %b expected %b", name, pass, exp_pass), pass == exp_pass);
    check($sformatf("%s: without injection hardware, signature %h expected %h", name, nf_signature, nf_sig),
          nf_done && nf_signature == nf_sig && nf_pass == (nf_sig == ref_sig));
    if (pass) n_pass++; else n_fail++;
    repeat (2) @(posedge clk);
    #1 check($sformatf("%s: verdict held", name), done && pass == exp_pass);
  endtask

  initial begin
    logic [15:0] good, bad;
    int detected;
    rst_n = 0; start = 0; mode = 1; num_patterns = '0; seed = 36'h1; ref_signature = '0; fi_sel = '0; fi_int = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("idle after reset", !busy && !done);

    // Deterministic test with the 51 recorded vectors, fault-free.
    good = predict(1'b1, 51, '0, -1, 0);
    session("deterministic fault-free", 1'b1, 51, 36'h1, -1, 0, good, good);
    session("deterministic wrong reference", 1'b1, 51, 36'h1, -1, 0, good ^ 16'h0100, good);

    // Every stuck-at fault on the 7 response lines.
    detected = 0;
    for (int line = 0; line < 7; line++) begin
      for (int sv = 0; sv < 2; sv++) begin
        bad = predict(1'b1, 51, '0, line, sv);
        session($sformatf("deterministic line %0d stuck-at-%0d", line, sv), 1'b1, 51, 36'h1, line, sv, good, bad);
        if (!pass) detected++;
      end
    end
    $display("response-line stuck-at faults detected by the signature: %0d of 14", detected);
    check("13 of the 14 response-line faults detected with the 51 recorded vectors", detected == 13);

    // Every stuck-at fault on the compactor's own lines 433..436.
    detected = 0;
    for (int line = 7; line < 11; line++) begin
      for (int sv = 0; sv < 2; sv++) begin
        bad = predict(1'b1, 51, '0, line, sv);
        session($sformatf("deterministic line %0d stuck-at-%0d", 426 + line, sv), 1'b1, 51, 36'h1, line, sv, good, bad);
        if (!pass) detected++;
      end
    end
    $display("compactor-line stuck-at faults detected by the signature: %0d of 8", detected);
    check("all 8 compactor-line faults detected with the 51 recorded vectors", detected == 8);

    // Pseudorandom sessions.
    good = predict(1'b0, 300, 36'h5_3C1A_9E27, -1, 0);
    session("pseudorandom fault-free", 1'b0, 300, 36'h5_3C1A_9E27, -1, 0, good, good);
    bad = predict(1'b0, 300, 36'h5_3C1A_9E27, 2, 1);
    session("pseudorandom 430 stuck-at-1", 1'b0, 300, 36'h5_3C1A_9E27, 2, 1, good, bad);
    check("pseudorandom fault changes the signature", bad != good);
    good = predict(1'b0, 64, 36'hF_FFFF_FFFF, -1, 0);
    session("pseudorandom second seed", 1'b0, 64, 36'hF_FFFF_FFFF, -1, 0, good, good);
    good = predict(1'b1, 20, '0, -1, 0);
    session("deterministic short", 1'b1, 20, 36'h1, -1, 0, good, good);

    $display("mechanisms: deterministic=%0d pseudorandom=%0d stuck-at-0=%0d stuck-at-1=%0d compactor-line=%0d pass=%0d fail=%0d restart=%0d mode-switch=%0d table-hits=%0d",
             n_det, n_prpg, n_sa0, n_sa1, n_int, n_pass, n_fail, n_restart, n_mode_switch, n_table_hits);
    check("deterministic session seen", n_det > 0);
    check("pseudorandom session seen", n_prpg > 0);
    check("stuck-at-0 injection seen", n_sa0 > 0);
    check("stuck-at-1 injection seen", n_sa1 > 0);
    check("compactor-line injection seen", n_int > 0);
    check("pass verdict seen", n_pass > 0);
    check("fail verdict seen", n_fail > 0);
    check("restart from done seen", n_restart > 0);
    check("mode switch seen", n_mode_switch > 0);
    check("recorded responses used", n_table_hits > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
