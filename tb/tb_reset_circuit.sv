// Testbench of reset_circuit: reset follows rst asynchronously, is released
// two clock edges after rst falls, and is high in any cycle with set_req;
// ext_reset ignores set_req.
module tb_reset_circuit;
  logic clk = 0, rst, set_req, reset, ext_reset;
  int checks = 0, failures = 0;

  reset_circuit dut (.clk, .rst, .set_req, .ext_reset, .reset);
  always #5 clk = ~clk;

  task automatic expect_val(input logic r, input logic e, input string what);
    checks += 2;
    if (reset !== r || ext_reset !== e) begin
      failures++;
      $display("%s: reset=%0d ext_reset=%0d expected %0d %0d", what, reset, ext_reset, r, e);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; set_req = 0;
    #2 rst = 1;
    #1 expect_val(1, 1, "asynchronous assertion");
    repeat (3) @(posedge clk);
    #1 rst = 0;
    expect_val(1, 1, "held after release");
    @(posedge clk); #1 expect_val(1, 1, "one edge after release");
    @(posedge clk); #1 expect_val(0, 0, "two edges after release");
    for (int k = 0; k < 50; k++) begin
      set_req = 1'($urandom);
      #1 expect_val(set_req, 0, "set_req");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
