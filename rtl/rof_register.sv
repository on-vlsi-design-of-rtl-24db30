// Loadable register with synchronous clear, used for the read-mask register
// (RMR), write-mask register (WMR), rank register (RR) and output register
// (OUTR) of the filter.
//
// load high: q takes d at the next rising edge. With CLEAR_WHEN_IDLE = 1 the
// register returns to zero on any edge without load, so a mask register holds
// its mask only for the single cycle after the instruction that set it (this
// is how RMR and WMR are used; RR and OUTR hold their value).
module rof_register #(
  parameter int unsigned W = 8,
  parameter bit CLEAR_WHEN_IDLE = 1'b0
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (clear)                q <= '0;
    else if (load)            q <= d;
    else if (CLEAR_WHEN_IDLE) q <= '0;
  end

endmodule
