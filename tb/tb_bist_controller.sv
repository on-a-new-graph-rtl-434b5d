// tb_bist_controller: session timing. For several session lengths N
// (including 0 and 1) it checks cycle by cycle that init is high only in
// the cycle start is seen, apply is high for exactly N cycles with
// pattern_index counting 0..N-1, check follows for one cycle, and done
// rises N+2 clock edges after the start edge and holds. A start during a
// session must be ignored, and a new start from done must begin again.
module tb_bist_controller;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, init, apply, check_o, busy, done;
  logic [15:0] num_patterns, pattern_index;

  bist_controller dut (.clk, .rst_n, .start, .num_patterns, .init, .apply, .pattern_index,
                       .check(check_o), .busy, .done);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic session(int n, bit poke_start);
    num_patterns = 16'(n);
    start = 1;
    #1 check($sformatf("N=%0d init with start", n), init);
    @(posedge clk); #1 start = 0;
    num_patterns = 16'hFFFF;   // captured at start: later changes must not matter
    for (int k = 0; k < n; k++) begin
      check($sformatf("N=%0d cycle %0d apply", n, k), apply && !check_o && busy && !done && !init);
      check($sformatf("N=%0d cycle %0d index %0d", n, k, pattern_index), pattern_index == 16'(k));
      if (poke_start && k == n / 2) start = 1;
      @(posedge clk); #1 start = 0;
    end
    check($sformatf("N=%0d check cycle", n), check_o && !apply && busy && !done);
    @(posedge clk); #1;
    check($sformatf("N=%0d done after N+2 edges", n), done && !busy && !apply && !check_o);
    repeat (3) @(posedge clk);
    #1 check($sformatf("N=%0d done held", n), done && !apply);
  endtask

  initial begin
    rst_n = 0; start = 0; num_patterns = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("idle after reset", !busy && !done && !apply && !check_o);
    session(5, 0);
    session(0, 0);
    session(1, 0);
    session(51, 1);
    session(7, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
