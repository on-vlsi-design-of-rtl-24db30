// Programmable rank-order filter processor built around a dual-cell RAM.
//
// The processor finds the r-th largest of N B-bit samples without sorting.
// The samples sit in the computing field of the DCRAM. Starting at the MSB,
// each bit-slice is read (P_READ with a one-hot mask), the level quantizer
// counts its 1s, Z, and decides the result bit v = (Z >= r), which enters the
// shift register at sr[0]. Then the polarization selector marks every word
// whose bit differs from v, and P_WRITE overwrites the lower bits of those
// words with the inverse of v (c_in = ~sr[0]): such a word is then certainly
// above or below the rank-order sample and can no longer change later
// decisions. After B reads the shift register holds the result and DONE
// moves it to the output register OUTR (d_out).
//
// Each instruction also carries a data-field operation, so the next window
// is loaded (LOAD) and copied into the computing field (COPY) while the
// current one is still being computed: with the published 1-D program one
// result leaves every 15 cycles.
//
// Interface: instruction (16 bits, see rof_pkg) and d_in are sampled at each
// rising edge; d_out changes one edge after a DONE is issued and done is
// high for that cycle. rst is asynchronous, active high. The block structure
// and the data flow follow the published architecture; cycle-level details
// are documented in the sub-blocks. The level quantizer's ones count z is
// left unused here; only its decision q enters the datapath.
module rof_processor
  import rof_pkg::*;
#(
  parameter int unsigned N  = 9,
  parameter int unsigned B  = 8,
  parameter int unsigned AW = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [15:0]  instruction,
  input  logic [B-1:0] d_in,
  output logic [B-1:0] d_out,
  output logic         done
);

  localparam int unsigned W = $clog2(N + 1);

  logic          set_req, reset, ext_reset;
  logic [3:0]    rank_f;
  logic          rd_load, wr_load, en;
  logic [B-1:0]  mask;
  logic          wr, cp, sen;
  logic [AW-1:0] addr;
  logic [B-1:0]  din_q;
  logic [B-1:0]  rm, wm;
  logic [3:0]    rr;
  logic [N-1:0]  c_d, c_wl;
  logic [W-1:0]  z;
  logic          q;
  logic [B-1:0]  sr;

  instruction_decoder #(.B(B), .AW(AW)) u_dec (
    .clk, .reset, .instr(instruction), .d_in,
    .set_req, .rank(rank_f), .rd_load, .wr_load, .mask, .en,
    .wr, .addr, .din_q, .cp, .sen, .done
  );

  reset_circuit u_rst (.clk, .rst, .set_req, .ext_reset, .reset);

  rof_register #(.W(4)) u_rr (
    .clk, .clear(ext_reset), .load(set_req), .d(rank_f), .q(rr)
  );
  rof_register #(.W(B), .CLEAR_WHEN_IDLE(1'b1)) u_rmr (
    .clk, .clear(reset), .load(rd_load), .d(mask), .q(rm)
  );
  rof_register #(.W(B), .CLEAR_WHEN_IDLE(1'b1)) u_wmr (
    .clk, .clear(reset), .load(wr_load), .d(mask), .q(wm)
  );

  dcram #(.N(N), .B(B), .AW(AW)) u_dcram (
    .clk, .clear(reset), .wr, .addr, .d_in(din_q), .cp,
    .rm, .wm, .c_in(~sr[0]), .c_wl, .c_d
  );

  level_quantizer #(.N(N), .W(W)) u_lq (
    .c_d, .rank(W'(rr)), .z, .q
  );

  polarization_selector #(.N(N)) u_ps (
    .clk, .clear(reset), .en(sen), .c_d, .sr0(sr[0]), .c_wl
  );

  shift_register #(.B(B)) u_sr (
    .clk, .clear(reset), .sen, .d(q), .sr
  );

  rof_register #(.W(B)) u_outr (
    .clk, .clear(reset), .load(en), .d(sr), .q(d_out)
  );

endmodule
