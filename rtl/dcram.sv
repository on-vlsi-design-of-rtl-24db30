// Dual-cell RAM (DCRAM): the maskable memory at the heart of the filter.
//
// Every bit of every word has two storage cells. The data cell belongs to the
// data field, which is written one word at a time from d_in (LOAD). The
// computing cell belongs to the computing field, on which the bit-sliced
// rank-order algorithm runs:
//   * copy   - when cp is high the whole data field is copied into the
//              computing field (one direction only);
//   * read   - the one-hot read mask rm selects one bit position j; output
//              c_d[i] is bit j of computing-field word i (a bit-slice);
//   * write  - every word i with c_wl[i] high gets the value c_in written into
//              the bit positions selected by the write mask wm (polarization).
//
// Timing: all three operations and the data-field write act on the inputs of
// the current cycle and update the arrays at the next rising edge. The read is
// combinational. While cp is high the read returns the data field, as a
// transparent copy cell would, so a COPY and the MSB read can share a cycle.
// The hi/lo sub-word split of the physical layout is not modelled. clear (from
// the reset circuit) empties both fields; the zero start state follows the
// published data-storage example, the clearing mechanism is this design's.
module dcram #(
  parameter int unsigned N  = 9,   // words = window size
  parameter int unsigned B  = 8,   // bits per sample
  parameter int unsigned AW = 4    // address width
) (
  input  logic          clk,
  input  logic          clear,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [B-1:0]  d_in,
  input  logic          cp,
  input  logic [B-1:0]  rm,
  input  logic [B-1:0]  wm,
  input  logic          c_in,
  input  logic [N-1:0]  c_wl,
  output logic [N-1:0]  c_d
);

  logic [B-1:0] dfield [N];
  logic [B-1:0] cfield [N];

  // Data field: addressed write.
  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < N; i++) dfield[i] <= '0;
    end else if (wr && (32'(addr) < N)) begin
      dfield[addr] <= d_in;
    end
  end

  // Computing field: copy, or bit-masked polarizing write per word.
  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < N; i++) cfield[i] <= '0;
    end else if (cp) begin
      for (int i = 0; i < N; i++) cfield[i] <= dfield[i];
    end else begin
      for (int i = 0; i < N; i++)
        if (c_wl[i]) cfield[i] <= (cfield[i] & ~wm) | (wm & {B{c_in}});
    end
  end

  // Bit-slice read: the masked bits of a word share one data line.
  always_comb begin
    for (int i = 0; i < N; i++)
      c_d[i] = |((cp ? dfield[i] : cfield[i]) & rm);
  end

endmodule
