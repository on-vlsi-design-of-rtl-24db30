// Scan line: a line delay for the 2-D filters.
//
// Behaves exactly like a chain of DEPTH registers that all shift when push is
// high: dout is the sample that was pushed DEPTH-1 pushes before the most
// recent one (it leaves the chain at the next push). It is built as a
// circular buffer in an array with one read/write pointer, so a whole image
// line costs one RAM rather than a register chain. Until DEPTH samples have
// been pushed after reset, dout is 0, as for a chain that starts empty.
// dout is combinational from the buffer; din is written at the rising edge
// where push is high. The published design only gives the length (one line
// minus the neighbouring D registers); the structure is this design's.
module scan_line #(
  parameter int unsigned DEPTH = 799,
  parameter int unsigned B     = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         push,
  input  logic [B-1:0] din,
  output logic [B-1:0] dout
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [B-1:0]  mem [DEPTH];
  logic [PW-1:0] ptr;
  logic          full;

  always_ff @(posedge clk) begin
    if (reset) begin
      ptr  <= '0;
      full <= 1'b0;
    end else if (push) begin
      if (32'(ptr) == DEPTH - 1) begin
        ptr  <= '0;
        full <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
  end

  assign dout = full ? mem[ptr] : '0;

endmodule
