// Complete rank-order filter: instruction sequencer, input path and the
// DCRAM-based processor.
//
// The processor is programmable; this top runs it as one of four filters,
// chosen by mode when start is pulsed:
//   0  1-D rank-order filter over the last N samples (rank r)
//   1  1-D recursive median filter: window of (N-1)/2 earlier outputs and
//      (N+1)/2 inputs (rank should be (N+1)/2)
//   2  2-D 3x3 rank-order filter over a raster-scanned image of width LINE_W
//   3  2-D 3x3 recursive median filter: the upper row and the left neighbour
//      of the window are earlier outputs
// Input samples are offered with pix/pix_valid and taken when pix_ready is
// also high, at most one per filter iteration (15 cycles for modes 0 and 2,
// 18 for modes 1 and 3 with 8-bit samples). A missing sample stalls the
// filter. Each done pulse presents a new d_out; the k-th result belongs to
// the window completed by the (k-1)-th sample taken (the first result after
// start is 0). The 2-D modes apply no border handling: windows at the left
// and right image edges span the end of one line and the start of the next,
// and lines above the first read as 0. rst is asynchronous, active high.
// Beside it, with its own ports, sits the fully-pipelined processor
// (rof_processor_fp, three windows in flight, 42-bit instructions): it has
// no sequencer of its own and takes its instruction stream, one word per
// cycle, and its samples (fp_d_in, sampled with a LOAD) directly;
// fp_d_out/fp_done behave like d_out/done. The two processors share only
// clk and rst.
// The sequencer's running flag is not needed at this level and is left open.
// The structure follows the published block diagrams; the mode switch and
// the handshake are this design's.
module rof_system
  import rof_pkg::*;
#(
  parameter int unsigned N      = 9,
  parameter int unsigned B      = 8,
  parameter int unsigned LINE_W = 800
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [1:0]   mode,
  input  logic [3:0]   rank,
  input  logic [B-1:0] pix,
  input  logic         pix_valid,
  output logic         pix_ready,
  output logic [B-1:0] d_out,
  output logic         done,
  // fully-pipelined processor, programmed directly
  input  logic [41:0]  fp_instruction,
  input  logic [B-1:0] fp_d_in,
  output logic [B-1:0] fp_d_out,
  output logic         fp_done
);

  logic [15:0]  instruction;
  logic [1:0]   input_sel;
  logic         pix_push, out_push;
  app_e         app;
  logic [B-1:0] d_in;
  logic         path_reset;

  instruction_sequencer #(.N(N), .B(B)) u_seq (
    .clk, .rst, .start, .mode(app_e'(mode)), .rank,
    .in_valid(pix_valid), .in_ready(pix_ready),
    .instruction, .input_sel, .pix_push, .out_push, .app, .running()
  );

  // The line buffers start empty at every (re)start.
  assign path_reset = rst | start;

  input_path #(.LINE_W(LINE_W), .B(B)) u_in (
    .clk, .reset(path_reset), .mode(app), .pix, .pix_push, .out_push,
    .d_out, .input_sel, .d_in
  );

  rof_processor #(.N(N), .B(B)) u_proc (
    .clk, .rst, .instruction, .d_in, .d_out, .done
  );

  rof_processor_fp #(.B(B)) u_proc_fp (
    .clk, .rst, .instruction(fp_instruction), .d_in(fp_d_in),
    .d_out(fp_d_out), .done(fp_done)
  );

endmodule
