// tb_c432_compactor_t1: checks compaction tree #1 for c432.
//  1. All 128 response words against a reference written as a truth
//     condition: 436 is 1 when exactly one of "431 differs from 432" and
//     "421 is 1 or 223, 329, 370, 430 are all 1" holds.
//  2. A single error on 431 or 432 (the lines merged only by XOR) must flip
//     436 for every response word.
//  3. The compacted stream of the 51 recorded c432 responses
//     (tb/c432_table51.hex) against the bit string worked out by hand.
//  4. Stuck-at faults on each of the 7 compactor inputs under those 51
//     responses: counts of faults visible at the c432 outputs and at 436.
//  5. A second instance built with FAULT_INJ = 1: with fi_int passing
//     (00 and 11) it must match the plain instance on every word; with a
//     stuck-at fault on each of the lines 433..436 it must match a model of
//     the faulty tree, and all 8 such faults must be visible at 436 under
//     the 51 recorded responses.
module tb_c432_compactor_t1;
  import bist_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  c432_resp_t z;
  logic n433, n434, n435, o436;

  c432_compactor_t1 dut (.z, .fi_int('0), .n433, .n434, .n435, .o436);

  logic [3:0][1:0] fi_int;
  logic f433, f434, f435, f436;

  c432_compactor_t1 #(.FAULT_INJ(1'b1)) dut_fi (
    .z, .fi_int, .n433(f433), .n434(f434), .n435(f435), .o436(f436)
  );

  // Tree with line 433+fl forced to fv (fl = -1: fault-free); returns the
  // lines 433..436 as bits 0..3.
  function automatic logic [3:0] tree_model(logic [6:0] v, int fl, logic fv);
    logic [3:0] n;
    n[0] = v[6] & v[5] & v[4] & v[2];
    if (fl == 0) n[0] = fv;
    n[1] = v[1] ^ v[0];
    if (fl == 1) n[1] = fv;
    n[2] = v[3] | n[0];
    if (fl == 2) n[2] = fv;
    n[3] = n[1] ^ n[2];
    if (fl == 3) n[3] = fv;
    return n;
  endfunction

  logic [43:0] table51 [0:50];
  localparam logic [1:0] PASS_CODES [2] = '{FI_PASS, FI_PASS_B};
  localparam string STREAM = "001011111100100001001000000010001111000010010001010";
  localparam int XOR_LINES [2] = '{1, 0};   // bit positions of 431, 432

  function automatic logic ref436(logic [6:0] v);
    // v[6]=223 v[5]=329 v[4]=370 v[3]=421 v[2]=430 v[1]=431 v[0]=432
    logic a, b;
    a = (v[1] != v[0]);
    b = v[3] || (v[6] && v[5] && v[4] && v[2]);
    return a != b;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    int det_mut, det_cmp, det_int;
    $readmemh("tb/c432_table51.hex", table51);
    for (int v = 0; v < 128; v++) begin
      logic base;
      z = c432_resp_t'(7'(v));
      #1;
      check($sformatf("o436 for %b", 7'(v)), o436, ref436(7'(v)));
      base = o436;
      foreach (XOR_LINES[i]) begin
        z = c432_resp_t'(7'(v) ^ (7'd1 << XOR_LINES[i]));
        #1;
        check($sformatf("single error on XOR-merged bit %0d for %b", XOR_LINES[i], 7'(v)), o436, !base);
      end
    end
    for (int t = 0; t < 51; t++) begin
      z = c432_resp_t'(table51[t][6:0]);
      #1;
      check($sformatf("table response %0d", t + 1), o436, STREAM[t] == "1");
    end
    det_mut = 0;
    det_cmp = 0;
    for (int line = 0; line < 7; line++) begin
      for (int sv = 0; sv < 2; sv++) begin
        logic seen_mut, seen_cmp;
        seen_mut = 0;
        seen_cmp = 0;
        for (int t = 0; t < 51; t++) begin
          logic [6:0] good, bad;
          good = table51[t][6:0];
          bad  = good;
          bad[line] = sv[0];
          if (bad != good) seen_mut = 1;
          z = c432_resp_t'(bad);
          #1;
          if (o436 != (STREAM[t] == "1")) seen_cmp = 1;
        end
        det_mut += int'(seen_mut);
        det_cmp += int'(seen_cmp);
      end
    end
    $display("output-line stuck-at faults under the 51 recorded responses: %0d visible at the c432 outputs, %0d at line 436",
             det_mut, det_cmp);
    checks++;
    if (det_mut != 14 || det_cmp != 12) begin
      failures++;
      $display("FAIL fault counts: expected 14 and 12");
    end
    for (int v = 0; v < 128; v++) begin
      foreach (PASS_CODES[c]) begin
        fi_int = {4{PASS_CODES[c]}};
        z = c432_resp_t'(7'(v));
        #1;
        check($sformatf("instance with injection, passing, for %b", 7'(v)),
              o436 == f436 && {n435, n434, n433} == {f435, f434, f433}, 1'b1);
        check($sformatf("tree model for %b", 7'(v)), f436, tree_model(7'(v), -1, 1'b0)[3]);
      end
    end
    det_int = 0;
    for (int fl = 0; fl < 4; fl++) begin
      for (int sv = 0; sv < 2; sv++) begin
        logic seen;
        seen = 0;
        fi_int = '0;
        fi_int[fl] = sv[0] ? FI_SA1 : FI_SA0;
        for (int t = 0; t < 51; t++) begin
          logic [3:0] m;
          z = c432_resp_t'(table51[t][6:0]);
          #1;
          m = tree_model(table51[t][6:0], fl, sv[0]);
          check($sformatf("line %0d stuck-at-%0d, response %0d", 433 + fl, sv, t + 1),
                {f436, f435, f434, f433} == m, 1'b1);
          if (f436 != (STREAM[t] == "1")) seen = 1;
        end
        det_int += int'(seen);
      end
    end
    $display("compactor-line stuck-at faults visible at line 436: %0d of 8", det_int);
    checks++;
    if (det_int != 8) begin
      failures++;
      $display("FAIL compactor-line fault count: expected 8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
