// Input path: everything between the sample/pixel input and the processor's
// d_in, for all four applications of the filter.
//
//   1-D ROF  d_in = pix.
//   1-D RMF  input_sel 0: pix, 1: d_out (the newest median is written back
//            into the window).
//   2-D ROF  pix -> D0 -> scan line (LINE_W-1) -> D1 -> scan line
//            (LINE_W-1) -> D2; input_sel 0/1/2 picks D0/D1/D2, the pixel of
//            the current line and of the one and two lines above, i.e. one
//            column of the 3x3 window.
//   2-D RMF  input_sel 0: D0, 1: D1 (pixel of the line above), 2: a scan
//            line (LINE_W-2) fed with d_out, giving the median of the line
//            above, 3: d_out itself (the median just computed).
// D registers and pixel scan lines advance on pix_push (one pixel taken per
// filter iteration); the median scan line advances on out_push. The
// multiplexer is combinational. The structure follows the published block
// diagrams; merging them behind one mode input is this design's choice.
module input_path
  import rof_pkg::*;
#(
  parameter int unsigned LINE_W = 800,
  parameter int unsigned B      = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  app_e         mode,
  input  logic [B-1:0] pix,
  input  logic         pix_push,
  input  logic         out_push,
  input  logic [B-1:0] d_out,
  input  logic [1:0]   input_sel,
  output logic [B-1:0] d_in
);

  logic [B-1:0] d0, d1, d2, sl1_out, sl2_out, slm_out;

  always_ff @(posedge clk) begin
    if (reset) begin
      d0 <= '0;
      d1 <= '0;
      d2 <= '0;
    end else if (pix_push) begin
      d0 <= pix;
      d1 <= sl1_out;
      d2 <= sl2_out;
    end
  end

  scan_line #(.DEPTH(LINE_W - 1), .B(B)) u_sl1 (
    .clk, .reset, .push(pix_push), .din(d0), .dout(sl1_out)
  );
  scan_line #(.DEPTH(LINE_W - 1), .B(B)) u_sl2 (
    .clk, .reset, .push(pix_push), .din(d1), .dout(sl2_out)
  );
  scan_line #(.DEPTH(LINE_W - 2), .B(B)) u_slm (
    .clk, .reset, .push(out_push), .din(d_out), .dout(slm_out)
  );

  always_comb begin
    unique case (mode)
      APP_ROF1D: d_in = pix;
      APP_RMF1D: d_in = input_sel[0] ? d_out : pix;
      APP_ROF2D: d_in = (input_sel == 2'd0) ? d0 : (input_sel == 2'd1) ? d1 : d2;
      APP_RMF2D: d_in = (input_sel == 2'd0) ? d0 : (input_sel == 2'd1) ? d1 :
                        (input_sel == 2'd2) ? slm_out : d_out;
      default:   d_in = pix;
    endcase
  end

endmodule
