// signature_analyzer: serial LFSR signature register (time compactor).
//
// The compacted response stream e(X) enters one bit per enabled clock,
// highest power first. The register holds the running remainder of
// e(X) divided by the feedback polynomial h(X) = X^WIDTH + POLY(X), so that
// after the last bit the signature is s(X) = e(X) mod h(X); the bits pushed
// out of the top stage form the quotient o(X) and are not needed for the
// verdict. Each step is s <= {s, din} mod h: shift left, bring din into
// stage 0, and XOR in POLY whenever a 1 leaves the top stage.
//
// The remainder form follows the polynomial-division view of signature
// analysis (e(X)/h(X) = o(X) + s(X)/h(X)). The degree and polynomial are not
// fixed by that view: the default 16-bit register with
// h(X) = X^16 + X^12 + X^5 + 1 is this design's choice, as are the reset and
// clear to zero.
//
// Interface: clear (priority) zeroes the register; en shifts in din.
// signature is registered; dout is the quotient bit leaving this cycle.
module signature_analyzer #(
  parameter int unsigned      WIDTH = 16,
  parameter logic [WIDTH-1:0] POLY  = 16'h1021
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic             din,
  output logic             dout,
  output logic [WIDTH-1:0] signature
);

  logic [WIDTH-1:0] shifted;

  always_comb begin
    shifted[0] = din;
    for (int unsigned i = 1; i < WIDTH; i++) shifted[i] = signature[i-1];
  end

  assign dout = signature[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature <= '0;
    end else if (clear) begin
      signature <= '0;
    end else if (en) begin
      signature <= dout ? (shifted ^ POLY) : shifted;
    end
  end

endmodule
