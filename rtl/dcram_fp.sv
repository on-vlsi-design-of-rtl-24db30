// Dual-cell RAM with three computing fields, for the fully-pipelined filter.
//
// One data field of M words and three computing fields (numbered 1..3), so
// that three windows can be polarized at the same time. M = N + 2*delta:
// the window size plus room for the samples of the two windows that start
// after the oldest one (11 words for a 9-point 1-D filter, delta = 1).
//   * load  - wr high: data-field word addr <= d_in.
//   * copy  - cp high: computing field c_cf <= data field, word by word
//             through the copy mask cm; a word with cm[i] = 0 is stored as
//             0, so samples outside the window cannot affect the rank.
//   * read  - computing field r_cf, bit position selected by the one-hot rm:
//             c_d[i] is that bit of word i.
//   * write - computing field w_cf: every word with c_wl[i] high gets c_in
//             in the bit positions of wm.
// A read, a write and a copy to three different fields can share a cycle.
// All updates happen at the rising edge; the read is combinational and, as
// in the single-field DCRAM, returns the masked data field while that field
// is being copied into the field read. A select value of 0 addresses no
// field. clear empties all fields. The three fields and the copy mask follow
// the published extension; the field numbering, the read bypass and the
// priority of a copy over a write to the same field are this design's.
module dcram_fp #(
  parameter int unsigned M  = 11,
  parameter int unsigned B  = 8,
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          clear,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [B-1:0]  d_in,
  input  logic          cp,
  input  logic [1:0]    c_cf,
  input  logic [M-1:0]  cm,
  input  logic [B-1:0]  rm,
  input  logic [1:0]    r_cf,
  input  logic [B-1:0]  wm,
  input  logic [1:0]    w_cf,
  input  logic          c_in,
  input  logic [M-1:0]  c_wl,
  output logic [M-1:0]  c_d
);

  localparam int unsigned NCF = 3;

  logic [B-1:0] dfield [M];
  logic [B-1:0] cfield [NCF][M];

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < M; i++) begin
        dfield[i] <= '0;
        for (int f = 0; f < NCF; f++) cfield[f][i] <= '0;
      end
    end else begin
      if (wr) dfield[addr] <= d_in;
      for (int f = 0; f < NCF; f++)
        for (int i = 0; i < M; i++)
          if (cp && c_cf == 2'(f + 1))
            cfield[f][i] <= cm[i] ? dfield[i] : '0;
          else if (w_cf == 2'(f + 1) && c_wl[i])
            cfield[f][i] <= (cfield[f][i] & ~wm) | ({B{c_in}} & wm);
    end
  end

  always_comb begin
    for (int i = 0; i < M; i++) begin
      logic [B-1:0] word;
      word = '0;
      for (int f = 0; f < NCF; f++)
        if (r_cf == 2'(f + 1)) word = cfield[f][i];
      if (cp && c_cf == r_cf) word = cm[i] ? dfield[i] : '0;
      c_d[i] = |(word & rm);
    end
  end

endmodule
