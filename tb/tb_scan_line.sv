// Testbench of scan_line with a short line (DEPTH = 5) and random push
// pattern: dout must equal the output of a zero-initialised chain of DEPTH
// registers that shift on push.
module tb_scan_line;
  localparam int D = 5;
  logic clk = 0, reset, push;
  logic [7:0] din, dout;
  logic [7:0] chain [D];
  int checks = 0, failures = 0;

  scan_line #(.DEPTH(D), .B(8)) dut (.clk, .reset, .push, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; push = 0; din = 0;
    for (int i = 0; i < D; i++) chain[i] = 0;
    @(posedge clk); #1;
    reset = 0;
    for (int k = 0; k < 400; k++) begin
      push = (($urandom % 3) != 0); din = 8'($urandom);
      #1;
      checks++;
      if (dout !== chain[D-1]) begin failures++; $display("dout=%0d expected %0d", dout, chain[D-1]); end
      @(posedge clk); #1;
      if (push) begin
        for (int i = D - 1; i > 0; i--) chain[i] = chain[i-1];
        chain[0] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
