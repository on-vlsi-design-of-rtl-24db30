// Testbench of polarization_selector (N = 9): the stored slice is captured
// only when en is high, and c_wl is the stored slice XOR sr0.
module tb_polarization_selector;
  logic clk = 0, clear, en, sr0;
  logic [8:0] c_d, c_wl, model;
  int checks = 0, failures = 0;

  polarization_selector dut (.clk, .clear, .en, .c_d, .sr0, .c_wl);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1; en = 0; c_d = 0; sr0 = 0;
    @(posedge clk); #1;
    clear = 0; model = 0;
    for (int k = 0; k < 500; k++) begin
      en = 1'($urandom); c_d = 9'($urandom);
      @(posedge clk); #1;
      if (en) model = c_d;
      for (int s = 0; s < 2; s++) begin
        sr0 = 1'(s);
        #1;
        checks++;
        if (c_wl !== (model ^ {9{sr0}})) begin
          failures++;
          $display("c_wl=%b expected %b", c_wl, model ^ {9{sr0}});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
