// Instruction decoder of the rank-order filter processor.
//
// Splits the 16-bit instruction (see rof_pkg) into its data-field and
// computing-field halves, which are decoded independently so that a LOAD,
// COPY or DONE can issue in the same cycle as a P_READ or P_WRITE.
//
// Timing (instruction issued in cycle t):
//   * set_req, rank, rd_load, wr_load, mask and en are combinational; the
//     registers they drive (RR, RMR, WMR, OUTR) load at the end of cycle t.
//   * wr/addr/din_q and cp are registered here at the end of cycle t; the
//     DCRAM performs the LOAD or COPY during t+1.
//   * sen (shift enable of the result register and capture enable of the
//     polarization selector) is high during t+1 for a P_READ issued in t,
//     the cycle in which RMR drives the bit-slice read.
//   * done is high during t+1 for a DONE issued in t: d_out has just changed.
// The encodings are the published ones; the register timing follows the
// published rule that all registers update a cycle after an instruction is
// issued, the rest is this design's choice.
module instruction_decoder
  import rof_pkg::*;
#(
  parameter int unsigned B  = 8,
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          reset,
  input  logic [15:0]   instr,
  input  logic [B-1:0]  d_in,
  // combinational decode
  output logic          set_req,
  output logic [3:0]    rank,
  output logic          rd_load,
  output logic          wr_load,
  output logic [B-1:0]  mask,
  output logic          en,
  // registered controls
  output logic          wr,
  output logic [AW-1:0] addr,
  output logic [B-1:0]  din_q,
  output logic          cp,
  output logic          sen,
  output logic          done
);

  instr_t i;
  logic   load_now, copy_now;

  assign i = instr_t'(instr);

  always_comb begin
    set_req  = (i.d_mode == DM_SET);
    load_now = (i.d_mode == DM_LOAD);
    copy_now = (i.d_mode == DM_COPYDONE) && i.operand[1];
    en       = (i.d_mode == DM_COPYDONE) && i.operand[0];
    rank     = i.operand;
    rd_load  = (i.c_mode == CM_READ);
    wr_load  = (i.c_mode == CM_WRITE);
    mask     = B'(i.mask);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr    <= 1'b0;
      addr  <= '0;
      din_q <= '0;
      cp    <= 1'b0;
      sen   <= 1'b0;
      done  <= 1'b0;
    end else begin
      wr    <= load_now;
      addr  <= AW'(i.operand);
      din_q <= d_in;
      cp    <= copy_now;
      sen   <= rd_load;
      done  <= en;
    end
  end

endmodule
