// tb_signature_comparator: the verdict is captured one clock after check,
// is a pass exactly when the two signatures are equal, holds while check
// is low, and is cleared by clear.
module tb_signature_comparator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, clear, check_i, valid, pass;
  logic [15:0] sig, ref_sig;

  signature_comparator dut (.clk, .rst_n, .clear, .check(check_i), .signature(sig),
                            .ref_signature(ref_sig), .valid, .pass);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; clear = 0; check_i = 0; sig = '0; ref_sig = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("no verdict after reset", !valid && !pass);
    for (int r = 0; r < 200; r++) begin
      logic same;
      same = ($urandom_range(0, 1) == 1);
      ref_sig = 16'($urandom);
      sig = same ? ref_sig : ref_sig ^ (16'd1 << $urandom_range(0, 15));
      check_i = 1;
      @(posedge clk); #1 check_i = 0;
      check($sformatf("verdict %0d", r), valid && pass == same);
      sig = ~sig;
      @(posedge clk); #1;
      check($sformatf("verdict %0d held", r), valid && pass == same);
      clear = 1;
      @(posedge clk); #1 clear = 0;
      check($sformatf("verdict %0d cleared", r), !valid && !pass);
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
