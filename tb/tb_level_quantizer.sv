// Testbench of level_quantizer (N = 9, W = 4): every one of the 512
// bit-slices against every rank 0..15; z must equal the number of 1s and q
// must equal (z >= rank), both computed here by counting.
module tb_level_quantizer;
  logic [8:0] c_d;
  logic [3:0] rank, z;
  logic       q;
  int checks = 0, failures = 0;

  level_quantizer dut (.c_d, .rank, .z, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 512; s++)
      for (int r = 0; r < 16; r++) begin
        int ones;
        c_d = 9'(s); rank = 4'(r);
        #1;
        ones = 0;
        for (int i = 0; i < 9; i++) ones += (s >> i) & 1;
        checks += 2;
        if (z != 4'(ones)) begin failures++; $display("slice %b: z=%0d expected %0d", c_d, z, ones); end
        if (q != (ones >= r)) begin failures++; $display("slice %b rank %0d: q=%0d", c_d, r, q); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
