// Level quantizer: threshold decomposition of one bit-slice.
//
// Z = number of 1s in the bit-slice c_d (the adder tree of the published
// design is a tree of full and half adders; here it is a plain sum that the
// synthesizer maps to such a tree). The output q = (Z >= rank) is produced,
// as in the published design, by a carry generator instead of a subtractor:
// q is the carry out of Z + ~rank + 1. Its LSB cell reduces to an OR,
// c0 = Z[0] | ~rank[0], and each higher cell is a majority gate,
// c(k+1) = Maj(Z[k], ~rank[k], c(k)). Purely combinational.
// W must hold the count N; W = ceil(log2(N+1)) is this design's choice
// (4 bits for N = 9, as published).
module level_quantizer #(
  parameter int unsigned N = 9,
  parameter int unsigned W = 4
) (
  input  logic [N-1:0] c_d,
  input  logic [W-1:0] rank,
  output logic [W-1:0] z,
  output logic         q
);

  function automatic logic maj(input logic a, input logic b, input logic c);
    return (a & b) | (b & c) | (a & c);
  endfunction

  logic [W:0] carry;

  always_comb begin
    z = '0;
    for (int i = 0; i < N; i++) z = z + W'(c_d[i]);
  end

  // Carry generator: OR cell at the LSB, majority cells above it.
  assign carry[0] = 1'b1;
  assign carry[1] = z[0] | ~rank[0];
  for (genvar k = 1; k < W; k++) begin : g_maj
    assign carry[k+1] = maj(z[k], ~rank[k], carry[k]);
  end

  assign q = carry[W];

endmodule
