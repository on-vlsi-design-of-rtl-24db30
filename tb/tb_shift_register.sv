// Testbench of shift_register (B = 8): random shift enables and bits, checked
// against a software register; clear is checked too.
module tb_shift_register;
  logic clk = 0, clear, sen, d;
  logic [7:0] sr, model;
  int checks = 0, failures = 0;

  shift_register dut (.clk, .clear, .sen, .d, .sr);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1; sen = 0; d = 0; model = 0;
    @(posedge clk); #1;
    clear = 0;
    for (int k = 0; k < 500; k++) begin
      sen = 1'($urandom); d = 1'($urandom);
      clear = (($urandom % 50) == 0);
      @(posedge clk); #1;
      if (clear) model = 0; else if (sen) model = {model[6:0], d};
      checks++;
      if (sr !== model) begin failures++; $display("sr=%b expected %b", sr, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
