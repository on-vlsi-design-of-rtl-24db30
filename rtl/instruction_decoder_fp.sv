// Instruction decoder of the fully-pipelined filter.
//
// Decodes the 42-bit extended instruction (see rof_pkg): SI1 (SET, LOAD,
// COPY), SI2 (DONE), SI3 (P_WRITE) and SI4 (P_READ) are decoded separately
// and act in the same cycle. A sub-instruction with an unused opcode acts as
// its null.
// Timing (instruction issued in cycle t), as in the single-field processor:
//   * set_req, rank, rd_load/rmask/r_cf, wr_load/wmask/w_cf and en are
//     combinational; RR, RMR, WMR and OUTR load them at the end of t.
//   * wr/addr/din_q and cp/c_cf/cm are registered; LOAD and COPY act in t+1.
//   * rd_v1 is high in t+1 (the slice of a P_READ is read, LQ1 captures
//     it); rd_v2 is high in t+2 (LQ2 decides, the shift register and the
//     polarization selector capture).
//   * done is high in t+1 for a DONE issued in t.
// The field positions are the published ones; the two-stage read timing
// follows the published three-stage loop, its exact cycles are this
// design's.
module instruction_decoder_fp
  import rof_pkg::*;
#(
  parameter int unsigned M  = 11,
  parameter int unsigned B  = 8,
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          reset,
  input  logic [41:0]   instr,
  input  logic [B-1:0]  d_in,
  // combinational decode
  output logic          set_req,
  output logic [3:0]    rank,
  output logic          rd_load,
  output logic [B-1:0]  rmask,
  output logic [1:0]    r_cf,
  output logic          wr_load,
  output logic [B-1:0]  wmask,
  output logic [1:0]    w_cf,
  output logic          en,
  // registered controls
  output logic          wr,
  output logic [AW-1:0] addr,
  output logic [B-1:0]  din_q,
  output logic          cp,
  output logic [1:0]    c_cf,
  output logic [M-1:0]  cm,
  output logic          rd_v1,
  output logic          rd_v2,
  output logic          done
);

  logic [15:0] si1;
  logic [1:0]  si2;
  logic [11:0] si3, si4;
  logic        load_now, copy_now;

  assign si1 = instr[41:26];
  assign si2 = instr[25:24];
  assign si3 = instr[23:12];
  assign si4 = instr[11:0];

  always_comb begin
    set_req  = (si1[15:13] == 3'b000);
    load_now = (si1[15:13] == 3'b001);
    copy_now = (si1[15:13] == 3'b010);
    rank     = si1[3:0];
    en       = (si2 == SI2_DONE);
    wr_load  = (si3[11:10] == 2'b00);
    w_cf     = si3[9:8];
    wmask    = B'(si3[7:0]);
    rd_load  = (si4[11:10] == 2'b00);
    r_cf     = si4[9:8];
    rmask    = B'(si4[7:0]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr    <= 1'b0;
      addr  <= '0;
      din_q <= '0;
      cp    <= 1'b0;
      c_cf  <= '0;
      cm    <= '0;
      rd_v1 <= 1'b0;
      rd_v2 <= 1'b0;
      done  <= 1'b0;
    end else begin
      wr    <= load_now;
      addr  <= AW'(si1[3:0]);
      din_q <= d_in;
      cp    <= copy_now;
      c_cf  <= si1[12:11];
      cm    <= M'(si1[10:0]);
      rd_v1 <= rd_load;
      rd_v2 <= rd_v1;
      done  <= en;
    end
  end

endmodule
