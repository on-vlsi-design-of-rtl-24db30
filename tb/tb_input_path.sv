// Testbench of input_path with a 6-pixel line: for each mode and select value
// d_in is compared with a model built from register chains (D0, line delay,
// D1, line delay, D2 for pixels; a (LINE_W-2)-deep chain for outputs).
module tb_input_path;
  import rof_pkg::*;
  localparam int LW = 6;
  logic clk = 0, reset, pix_push, out_push;
  logic [7:0] pix, d_out, d_in;
  logic [1:0] input_sel;
  app_e mode;
  logic [7:0] pc [2*LW + 1];   // pc[0] = D0, pc[LW] = D1, pc[2*LW] = D2
  logic [7:0] oc [LW - 2];
  int checks = 0, failures = 0;

  input_path #(.LINE_W(LW)) dut (.clk, .reset, .mode, .pix, .pix_push, .out_push, .d_out, .input_sel, .d_in);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expect_din();
    case (mode)
      APP_ROF1D: return pix;
      APP_RMF1D: return input_sel[0] ? d_out : pix;
      APP_ROF2D: return (input_sel == 0) ? pc[0] : (input_sel == 1) ? pc[LW] : pc[2*LW];
      default:   return (input_sel == 0) ? pc[0] : (input_sel == 1) ? pc[LW] :
                        (input_sel == 2) ? oc[LW-3] : d_out;
    endcase
  endfunction

  initial begin
    reset = 1; pix_push = 0; out_push = 0; pix = 0; d_out = 0; input_sel = 0; mode = APP_ROF1D;
    @(posedge clk); #1;
    reset = 0;
    foreach (pc[i]) pc[i] = 0;
    foreach (oc[i]) oc[i] = 0;
    for (int k = 0; k < 3000; k++) begin
      pix = 8'($urandom); d_out = 8'($urandom);
      pix_push = 1'($urandom); out_push = 1'($urandom);
      mode = app_e'($urandom % 4);
      for (int s = 0; s < 4; s++) begin
        input_sel = 2'(s);
        #1;
        checks++;
        if (d_in !== expect_din()) begin
          failures++;
          $display("mode %0d sel %0d: d_in=%0d expected %0d", mode, s, d_in, expect_din());
        end
      end
      @(posedge clk); #1;
      if (pix_push) begin
        for (int i = 2 * LW; i > 0; i--) pc[i] = pc[i-1];
        pc[0] = pix;
      end
      if (out_push) begin
        for (int i = LW - 3; i > 0; i--) oc[i] = oc[i-1];
        oc[0] = d_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
