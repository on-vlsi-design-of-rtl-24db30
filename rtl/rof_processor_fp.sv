// Fully-pipelined rank-order filter processor: three windows in flight.
//
// The bit-sliced algorithm of rof_processor (read a bit-slice, decide the
// result bit v = (Z >= r), polarize the lower bits of the words that
// disagree) has a loop read -> level quantizer -> shift register ->
// polarizing write. Here the level quantizer is cut into two stages, so the
// loop takes three cycles, and three windows are processed in turn, each in
// its own computing field: in every cycle one field is read, another is
// polarized and a third may be copied. With the 1-D 9-point program a result
// leaves every 8 cycles on average (three results per 24 cycles), against 15
// for the single-field processor.
//
// Data path for a P_READ issued in cycle t:
//   t+1  RMR and r_cf select a bit-slice of one computing field; LQ1 counts
//        it and, with the slice itself, it is registered.
//   t+2  LQ2 decides the result bit; it enters the shift register and the
//        polarization selector stores the slice at the end of the cycle.
//   t+3  a P_WRITE issued in t+2 polarizes that field (c_in = ~sr[0],
//        c_wl = slice XOR sr[0]); the next slice of that field can be read
//        from t+4 on.
// The shift register is 3B bits long and receives the result bits of the
// three windows interleaved, so the bits of one window sit three places
// apart. DONE, issued in the cycle after a window's LSB entered sr[0], loads
// OUTR with sr[0], sr[3], ..., sr[3(B-1)] (sr[3(B-1)] is the MSB).
// The data field has M = N + 2 words; COPY selects the window's words with
// its copy mask and stores the others as 0.
//
// Interface: instruction is the 42-bit extended word (see rof_pkg), sampled
// with d_in at each rising edge; d_out changes one edge after a DONE and
// done is high for that cycle. rst is asynchronous, active high.
// The three computing fields, the copy mask, the two-stage level quantizer
// and the instruction format follow the published fully-pipelined design;
// the interleaved 3B-bit shift register, the extra slice register and the
// exact cycles are this design's.
module rof_processor_fp
  import rof_pkg::*;
#(
  parameter int unsigned M  = 11,
  parameter int unsigned B  = 8,
  parameter int unsigned AW = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [41:0]  instruction,
  input  logic [B-1:0] d_in,
  output logic [B-1:0] d_out,
  output logic         done
);

  localparam int unsigned W = $clog2(M + 1);

  logic            set_req, reset, ext_reset;
  logic [3:0]      rank_f, rr;
  logic            rd_load, wr_load, en;
  logic [B-1:0]    rmask, wmask, rm, wm;
  logic [1:0]      r_cf_d, w_cf_d, r_cf, w_cf, c_cf;
  logic            wr, cp, rd_v1, rd_v2;
  logic [AW-1:0]   addr;
  logic [B-1:0]    din_q;
  logic [M-1:0]    cm, c_d, c_wl, slice1;
  logic            q;
  logic [3*B-1:0]  sr;
  logic [B-1:0]    result;

  instruction_decoder_fp #(.M(M), .B(B), .AW(AW)) u_dec (
    .clk, .reset, .instr(instruction), .d_in,
    .set_req, .rank(rank_f), .rd_load, .rmask, .r_cf(r_cf_d),
    .wr_load, .wmask, .w_cf(w_cf_d), .en,
    .wr, .addr, .din_q, .cp, .c_cf, .cm, .rd_v1, .rd_v2, .done
  );

  reset_circuit u_rst (.clk, .rst, .set_req, .ext_reset, .reset);

  rof_register #(.W(4)) u_rr (
    .clk, .clear(ext_reset), .load(set_req), .d(rank_f), .q(rr)
  );
  // RMR and WMR hold the field select next to the mask.
  rof_register #(.W(B + 2), .CLEAR_WHEN_IDLE(1'b1)) u_rmr (
    .clk, .clear(reset), .load(rd_load), .d({r_cf_d, rmask}), .q({r_cf, rm})
  );
  rof_register #(.W(B + 2), .CLEAR_WHEN_IDLE(1'b1)) u_wmr (
    .clk, .clear(reset), .load(wr_load), .d({w_cf_d, wmask}), .q({w_cf, wm})
  );

  dcram_fp #(.M(M), .B(B), .AW(AW)) u_dcram (
    .clk, .clear(reset), .wr, .addr, .d_in(din_q), .cp, .c_cf, .cm,
    .rm, .r_cf, .wm, .w_cf, .c_in(~sr[0]), .c_wl, .c_d
  );

  level_quantizer_pipe #(.N(M), .W(W)) u_lq (
    .clk, .clear(reset), .en(rd_v1), .c_d, .rank(W'(rr)), .q
  );

  // Slice register alongside LQ1, then the polarization selector alongside
  // LQ2, so c_wl belongs to the field whose result bit is in sr[0].
  rof_register #(.W(M)) u_slice1 (
    .clk, .clear(reset), .load(rd_v1), .d(c_d), .q(slice1)
  );

  polarization_selector #(.N(M)) u_ps (
    .clk, .clear(reset), .en(rd_v2), .c_d(slice1), .sr0(sr[0]), .c_wl
  );

  shift_register #(.B(3 * B)) u_sr (
    .clk, .clear(reset), .sen(rd_v2), .d(q), .sr
  );

  always_comb
    for (int k = 0; k < B; k++) result[k] = sr[3*k];

  rof_register #(.W(B)) u_outr (
    .clk, .clear(reset), .load(en), .d(result), .q(d_out)
  );

endmodule
