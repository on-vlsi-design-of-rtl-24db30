// Polarization selector (PS).
//
// Holds the bit-slice that was just read (one flip-flop per word) and compares
// each word's bit with sr0, the result bit the level quantizer has just
// decided. A word whose bit differs from the result can no longer be the
// rank-order sample, so its write line c_wl is raised and its lower bits are
// overwritten by the inverse of sr0 in the next polarizing write:
//   c_wl[i] = slice[i] XOR sr0.
// Timing: the slice is captured at the rising edge that ends a read cycle
// (en high); c_wl is combinational from the stored slice and sr0. The
// capture enable is this design's addition; it keeps the stored slice when
// idle cycles separate a read from its polarization.
module polarization_selector #(
  parameter int unsigned N = 9
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         en,
  input  logic [N-1:0] c_d,
  input  logic         sr0,
  output logic [N-1:0] c_wl
);

  logic [N-1:0] slice;

  always_ff @(posedge clk) begin
    if (clear)   slice <= '0;
    else if (en) slice <= c_d;
  end

  assign c_wl = slice ^ {N{sr0}};

endmodule
