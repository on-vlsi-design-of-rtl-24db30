// Reset circuit.
//
// Produces the internal reset of the filter's registers and memory fields.
// The external rst (asynchronous, active high) is synchronized with a
// two-flop chain so that it is released cleanly on a clock edge; the SET
// instruction, decoded in the current cycle, also resets every register
// (the rank register is loaded at the same edge). reset is high in any cycle
// where either source is active, and is sampled by the synchronous clears.
// ext_reset is the synchronized external reset alone; the rank register uses
// it so that SET can clear everything else while loading the rank.
// The published design only names this block; the synchronizer is this
// design's choice.
module reset_circuit (
  input  logic clk,
  input  logic rst,
  input  logic set_req,
  output logic ext_reset,
  output logic reset
);

  logic [1:0] sync;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], 1'b0};
  end

  assign ext_reset = sync[1];
  assign reset     = sync[1] | set_req;

endmodule
