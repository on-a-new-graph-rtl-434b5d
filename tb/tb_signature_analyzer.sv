// tb_signature_analyzer: checks that the signature is the remainder of the
// input polynomial divided by h(X) = X^16 + X^12 + X^5 + 1.
//  - known cases: a stream shorter than 17 bits is its own remainder; X^16
//    leaves POLY; h(X) itself leaves zero; h(X) * X^k leaves zero.
//  - random streams: the expected remainder is built by linearity as the
//    XOR of X^i mod h(X) over the 1-bits of the stream, with X^i mod h(X)
//    obtained by repeated multiplication by X.
//  - clear restarts the division; en low holds the signature.
module tb_signature_analyzer;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam logic [15:0] POLY = 16'h1021;

  logic rst_n, clear, en, din, dout;
  logic [15:0] signature;

  signature_analyzer dut (.clk, .rst_n, .clear, .en, .din, .dout, .signature);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Feed bits msg[len-1] first (highest power first).
  task automatic feed(input logic [511:0] msg, input int len);
    clear = 1;
    @(posedge clk); #1 clear = 0;
    en = 1;
    for (int i = len - 1; i >= 0; i--) begin
      din = msg[i];
      @(posedge clk); #1;
    end
    en = 0;
  endtask

  function automatic logic [15:0] x_pow_mod(int i);
    logic [15:0] r;
    r = 16'h0001;   // X^0
    for (int k = 0; k < i; k++) begin
      logic top;
      top = r[15];
      r = {r[14:0], 1'b0};
      if (top) r ^= POLY;
    end
    return r;
  endfunction

  initial begin
    logic [511:0] msg;
    logic [15:0] expect_sig;
    rst_n = 0; clear = 0; en = 0; din = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset value zero", signature == 16'h0);
    msg = 512'hBEEF;
    feed(msg, 16);
    check("short stream is its own remainder", signature == 16'hBEEF);
    msg = 512'h1_0000;
    feed(msg, 17);
    check("X^16 leaves POLY", signature == POLY);
    msg = {495'b0, 1'b1, POLY};
    feed(msg, 17);
    check("h(X) leaves zero", signature == 16'h0);
    msg = {495'b0, 1'b1, POLY} << 40;
    feed(msg, 60);
    check("h(X)*X^40 leaves zero", signature == 16'h0);
    begin
      logic [15:0] hold;
      msg = 512'h1234;
      feed(msg, 16);
      hold = signature;
      repeat (4) @(posedge clk);
      #1 check("hold with en low", signature == hold);
    end
    for (int r = 0; r < 40; r++) begin
      int len;
      len = 1 + int'($urandom_range(0, 500));
      for (int w = 0; w < 16; w++) msg[w*32 +: 32] = $urandom;
      for (int i = len; i < 512; i++) msg[i] = 1'b0;
      expect_sig = '0;
      for (int i = 0; i < len; i++) if (msg[i]) expect_sig ^= x_pow_mod(i);
      feed(msg, len);
      check($sformatf("random stream %0d (length %0d): got %h expected %h", r, len, signature, expect_sig),
            signature == expect_sig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
