// signature_comparator: compares the final signature with the stored
// fault-free signature and holds the test result.
//
// When check is high the comparison signature == ref_signature is captured
// into pass and valid is set; both then hold until clear (the start of the
// next session) or reset. The fault-free reference is supplied from
// outside (it is computed once, on a good circuit, and stored). A
// mismatch means a fault was detected; a match means none was seen, which
// is a true pass when the compactors are free of aliasing.
//
// Timing: result registered one clock after check. Clear has priority.
// The register-and-hold behaviour is this design's choice.
module signature_comparator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             check,
  input  logic [WIDTH-1:0] signature,
  input  logic [WIDTH-1:0] ref_signature,
  output logic             valid,
  output logic             pass
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      pass  <= 1'b0;
    end else if (clear) begin
      valid <= 1'b0;
      pass  <= 1'b0;
    end else if (check) begin
      valid <= 1'b1;
      pass  <= (signature == ref_signature);
    end
  end

endmodule
