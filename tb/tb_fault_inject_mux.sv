// tb_fault_inject_mux: for a single wire and for a 3-wire bundle, every
// data value and every select: 00 and 11 pass the wire, 01 gives 1 and
// 10 gives 0, each wire independently of the others.
module tb_fault_inject_mux;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            d1, y1;
  logic [0:0][1:0] s1;
  logic [2:0]      d3, y3;
  logic [2:0][1:0] s3;

  fault_inject_mux dut1 (.d(d1), .sel(s1), .y(y1));
  fault_inject_mux #(.WIDTH(3)) dut3 (.d(d3), .sel(s3), .y(y3));

  function automatic logic expect_bit(logic d, logic [1:0] s);
    if (s == 2'b01) return 1'b1;
    if (s == 2'b10) return 1'b0;
    return d;
  endfunction

  initial begin
    for (int v = 0; v < 8; v++) begin
      d1 = v[0]; s1[0] = v[2:1];
      #1;
      checks++;
      if (y1 !== expect_bit(d1, s1[0])) begin
        failures++;
        $display("FAIL single wire d=%b sel=%b y=%b", d1, s1[0], y1);
      end
    end
    for (int v = 0; v < 512; v++) begin
      d3 = v[2:0]; s3 = v[8:3];
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (y3[i] !== expect_bit(d3[i], s3[i])) begin
          failures++;
          $display("FAIL wire %0d d=%b sel=%b y=%b", i, d3, s3, y3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
