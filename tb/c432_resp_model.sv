// c432_resp_model: behavioural stand-in for the ISCAS 85 c432 benchmark,
// for simulation only.
//
// The c432 netlist is not part of this design. What is known of the
// circuit here is a table of 51 deterministic test vectors and the
// fault-free seven-bit response to each (tb/c432_table51.hex, one line per
// vector: the 36-bit vector, input 1 first, followed by the outputs
// 223, 329, 370, 421, 430, 431, 432). For a vector found in the table the
// model returns the recorded response. For any other vector (pseudorandom
// sessions) it returns a fixed stand-in function of the inputs: output k
// is the parity of the input bits i with i mod 7 == k, inverted for odd k.
// That function is not c432; it only gives the response path something
// deterministic to compact. hit tells which case applied.
module c432_resp_model (
  input  logic [35:0] x,
  output logic [6:0]  z,
  output logic        hit
);

  logic [43:0] table51 [0:50];

  initial $readmemh("tb/c432_table51.hex", table51);

  always_comb begin
    hit = 1'b0;
    z   = '0;
    for (int k = 0; k < 7; k++) begin
      logic p;
      p = (k % 2 == 1);
      for (int i = k; i < 36; i += 7) p ^= x[i];
      z[6-k] = p;
    end
    for (int t = 0; t < 51; t++) begin
      if (!hit && table51[t][42:7] == x) begin
        hit = 1'b1;
        z   = table51[t][6:0];
      end
    end
  end

endmodule
