// Two-stage level quantizer of the fully-pipelined filter.
//
// Same function as level_quantizer, q = (number of 1s in c_d) >= rank, cut
// into two pipeline stages so that the loop computing field -> quantizer ->
// shift register takes three cycles:
//   LQ1  the ones count Z of the bit-slice (adder tree), registered at the
//        rising edge where en is high;
//   LQ2  the carry generator on the registered count: an OR cell
//        c1 = Z[0] | ~rank[0] and majority cells
//        c(k+1) = Maj(Z[k], ~rank[k], c(k)) above it; q = carry out.
// q is combinational from the LQ1 register and rank, so it is valid in the
// cycle after the slice was read. The split into a tree stage and a
// carry-generator stage follows the published design; where the register
// sits between them is this design's choice. clear resets the register.
module level_quantizer_pipe #(
  parameter int unsigned N = 11,
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         en,
  input  logic [N-1:0] c_d,
  input  logic [W-1:0] rank,
  output logic         q
);

  function automatic logic maj(input logic a, input logic b, input logic c);
    return (a & b) | (b & c) | (a & c);
  endfunction

  logic [W-1:0] z, z_q;
  logic [W:0]   carry;

  always_comb begin
    z = '0;
    for (int i = 0; i < N; i++) z = z + W'(c_d[i]);
  end

  always_ff @(posedge clk) begin
    if (clear)   z_q <= '0;
    else if (en) z_q <= z;
  end

  assign carry[0] = 1'b1;
  assign carry[1] = z_q[0] | ~rank[0];
  for (genvar k = 1; k < W; k++) begin : g_maj
    assign carry[k+1] = maj(z_q[k], ~rank[k], carry[k]);
  end

  assign q = carry[W];

endmodule
