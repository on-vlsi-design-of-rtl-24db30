// Result shift register.
//
// Collects the rank-order result one bit per bit-slice read, MSB first: on
// each rising edge with sen high the register shifts toward the MSB and the
// level quantizer's output enters sr[0]. After B reads sr holds the complete
// B-bit result and sr[0] is always the most recently decided bit, which the
// polarization selector and the polarization value c_in use.
module shift_register #(
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         sen,
  input  logic         d,
  output logic [B-1:0] sr
);

  always_ff @(posedge clk) begin
    if (clear)    sr <= '0;
    else if (sen) sr <= {sr[B-2:0], d};
  end

endmodule
