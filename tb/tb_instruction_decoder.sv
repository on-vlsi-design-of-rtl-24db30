// Testbench of instruction_decoder: random 16-bit instructions; the
// combinational outputs are checked against the field layout of the
// instruction format in the same cycle, the registered controls one cycle
// later.
module tb_instruction_decoder;
  logic clk = 0, reset;
  logic [15:0] instr;
  logic [7:0] d_in, mask, din_q;
  logic set_req, rd_load, wr_load, en, wr, cp, sen, done;
  logic [3:0] rank, addr;
  int checks = 0, failures = 0;

  instruction_decoder dut (.clk, .reset, .instr, .d_in, .set_req, .rank, .rd_load, .wr_load,
                           .mask, .en, .wr, .addr, .din_q, .cp, .sen, .done);
  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %0d expected %0d (instr %h)", what, got, exp, instr); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] p;
    logic [7:0]  pd;
    reset = 1; instr = 16'hFFFF; d_in = 0;
    @(posedge clk); #1;
    reset = 0;
    for (int k = 0; k < 1000; k++) begin
      instr = 16'($urandom); d_in = 8'($urandom);
      #1;
      chk(set_req, instr[15:14] == 2'b00, "set_req");
      chk(rd_load, instr[9:8] == 2'b00, "rd_load");
      chk(wr_load, instr[9:8] == 2'b01, "wr_load");
      chk(en, instr[15:14] == 2'b10 && instr[10], "en");
      checks += 2;
      if (rank !== instr[13:10]) begin failures++; $display("rank"); end
      if (mask !== instr[7:0]) begin failures++; $display("mask"); end
      p = instr; pd = d_in;
      @(posedge clk); #1;
      chk(wr, p[15:14] == 2'b01, "wr");
      chk(cp, p[15:14] == 2'b10 && p[11], "cp");
      chk(sen, p[9:8] == 2'b00, "sen");
      chk(done, p[15:14] == 2'b10 && p[10], "done");
      checks += 2;
      if (addr !== p[13:10]) begin failures++; $display("addr"); end
      if (din_q !== pd) begin failures++; $display("din_q"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
