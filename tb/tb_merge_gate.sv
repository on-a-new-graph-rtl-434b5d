// tb_merge_gate: exhaustive check of the merger gate for all six gate types
// at fan-ins 2, 3, 4 and 7. The expected value is worked out from the
// number of ones in the input word: AND is all ones, OR at least one, XOR
// an odd count; the N-forms are the complements.
module tb_merge_gate;
  import bist_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NS [4] = '{2, 3, 4, 7};
  localparam gate_e GS [6] = '{G_AND, G_NAND, G_OR, G_NOR, G_XOR, G_XNOR};

  logic [6:0] a;
  logic       y [4][6];

  for (genvar n = 0; n < 4; n++) begin : g_n
    for (genvar g = 0; g < 6; g++) begin : g_g
      merge_gate #(.N(NS[n]), .GATE(GS[g])) dut (.a(a[NS[n]-1:0]), .y(y[n][g]));
    end
  end

  function automatic logic expect_y(gate_e g, int n, logic [6:0] v);
    int ones = 0;
    for (int i = 0; i < n; i++) ones += int'(v[i]);
    case (g)
      G_AND:  return ones == n;
      G_NAND: return ones != n;
      G_OR:   return ones > 0;
      G_NOR:  return ones == 0;
      G_XOR:  return ones % 2 == 1;
      default: return ones % 2 == 0;
    endcase
  endfunction

  initial begin
    for (int v = 0; v < 128; v++) begin
      a = 7'(v);
      #1;
      for (int n = 0; n < 4; n++) begin
        if (v < (1 << NS[n])) begin
          for (int g = 0; g < 6; g++) begin
            checks++;
            if (y[n][g] !== expect_y(GS[g], NS[n], a)) begin
              failures++;
              $display("FAIL gate %s N=%0d a=%b y=%b", GS[g].name(), NS[n], a, y[n][g]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
