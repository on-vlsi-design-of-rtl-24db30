// Testbench of dcram (N = 9, B = 8): random mixes of data-field writes,
// copies, one-hot bit-slice reads and masked polarizing writes, checked every
// cycle against a two-array software model, plus the read of the data field
// while cp is high.
module tb_dcram;
  localparam int N = 9, B = 8;
  logic clk = 0, clear, wr, cp, c_in;
  logic [3:0] addr;
  logic [7:0] d_in, rm, wm;
  logic [8:0] c_wl, c_d;
  logic [7:0] df [N], cf [N];
  int checks = 0, failures = 0;

  dcram dut (.clk, .clear, .wr, .addr, .d_in, .cp, .rm, .wm, .c_in, .c_wl, .c_d);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [8:0] slice();
    logic [8:0] s;
    for (int i = 0; i < N; i++) s[i] = |((cp ? df[i] : cf[i]) & rm);
    return s;
  endfunction

  initial begin
    clear = 1; wr = 0; cp = 0; c_in = 0; addr = 0; d_in = 0; rm = 0; wm = 0; c_wl = 0;
    @(posedge clk); #1;
    clear = 0;
    for (int i = 0; i < N; i++) begin df[i] = 0; cf[i] = 0; end
    for (int k = 0; k < 3000; k++) begin
      wr   = (($urandom % 3) == 0);
      addr = 4'($urandom % N);
      d_in = 8'($urandom);
      cp   = (($urandom % 8) == 0);
      rm   = 8'(1 << ($urandom % 8));
      wm   = (($urandom % 2) != 0) ? 8'((1 << ($urandom % 9)) - 1) : 8'h00;
      c_in = 1'($urandom);
      c_wl = 9'($urandom);
      #1;
      checks++;
      if (c_d !== slice()) begin failures++; $display("c_d=%b expected %b", c_d, slice()); end
      @(posedge clk); #1;
      if (cp) for (int i = 0; i < N; i++) cf[i] = df[i];
      else for (int i = 0; i < N; i++) if (c_wl[i]) cf[i] = (cf[i] & ~wm) | (wm & {8{c_in}});
      if (wr) df[addr] = d_in;
    end
    // read every stored bit explicitly
    wr = 0; cp = 0; c_wl = 0; wm = 0;
    for (int j = 0; j < B; j++) begin
      rm = 8'(1 << j);
      #1;
      checks++;
      if (c_d !== slice()) begin failures++; $display("final slice %0d wrong", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
