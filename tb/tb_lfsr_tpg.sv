// tb_lfsr_tpg: checks the pattern generator.
//  - default 3-stage generator: from reset (seed 111) the states must be
//    the published sequence 111, 011, 001, 100, 010, 101, 110, 111
//    (Q1 Q2 Q3), i.e. period 7 = 2^3 - 1; en low must hold the state;
//    load must take a new seed.
//  - 8-stage generator with taps 8, 6, 5, 4 (a primitive polynomial):
//    must visit all 255 non-zero states once before repeating.
//  - 36-stage generator as used in the c432 BIST (taps 36, 25): the first
//    500 states against a model that shifts and feeds back Q36 xor Q25.
module tb_lfsr_tpg;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, load, en;
  logic [2:0]  seed3;
  logic [2:0]  q3;
  logic [7:0]  q8;
  logic [35:0] seed36, q36;

  lfsr_tpg dut3 (.clk, .rst_n, .load, .seed(seed3), .en, .q(q3));
  lfsr_tpg #(.WIDTH(8), .TAPS(8'b1011_1000), .RESET_SEED(8'h01)) dut8 (
    .clk, .rst_n, .load(1'b0), .seed(8'h00), .en, .q(q8));
  lfsr_tpg #(.WIDTH(36), .TAPS(36'h801000000)) dut36 (
    .clk, .rst_n, .load, .seed(seed36), .en, .q(q36));

  // Published sequence, written Q1 Q2 Q3 (q[0] q[1] q[2]).
  localparam string SEQ [8] = '{"111", "011", "001", "100", "010", "101", "110", "111"};

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic string q1q2q3(logic [2:0] q);
    return $sformatf("%b%b%b", q[0], q[1], q[2]);
  endfunction

  initial begin
    bit seen [256];
    logic [35:0] m36;
    rst_n = 0; load = 0; en = 0; seed3 = 3'b111; seed36 = 36'h1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Published 3-stage sequence, one state per clock.
    for (int k = 0; k < 8; k++) begin
      check($sformatf("3-stage clock %0d: %s expected %s", k + 1, q1q2q3(q3), SEQ[k]), q1q2q3(q3) == SEQ[k]);
      en = 1;
      @(posedge clk); #1;
    end
    en = 0;
    begin
      logic [2:0] hold;
      hold = q3;
      repeat (3) @(posedge clk);
      #1 check("hold with en low", q3 == hold);
    end
    // Load a new seed: 001 (Q1=1) must continue as in the table from 100.
    seed3 = 3'b001; load = 1;
    @(posedge clk); #1 load = 0;
    check("load seed", q1q2q3(q3) == "100");
    en = 1;
    @(posedge clk); #1;
    check("after load", q1q2q3(q3) == "010");
    en = 0;
    // 8-stage period: restart from reset.
    rst_n = 0; #1 rst_n = 1;
    foreach (seen[i]) seen[i] = 0;
    en = 1;
    for (int k = 0; k < 255; k++) begin
      check($sformatf("8-stage state %0d not repeated early", k), !seen[q8] && q8 != 0);
      seen[q8] = 1;
      @(posedge clk); #1;
    end
    check("8-stage period 255", q8 == 8'h01);
    en = 0;
    // 36-stage generator against its model.
    seed36 = 36'h9_A5C3_1E7B; load = 1;
    @(posedge clk); #1 load = 0;
    m36 = seed36;
    en = 1;
    for (int k = 0; k < 500; k++) begin
      check($sformatf("36-stage state %0d", k), q36 == m36);
      m36 = {m36[34:0], m36[35] ^ m36[24]};
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
