// Testbench of rof_register in both flavours: a holding register (RR/OUTR
// use) and a mask register that returns to zero when not loaded (RMR/WMR use).
module tb_rof_register;
  logic clk = 0, clear, load;
  logic [7:0] d, q_hold, q_idle, m_hold, m_idle;
  int checks = 0, failures = 0;

  rof_register #(.W(8)) u_hold (.clk, .clear, .load, .d, .q(q_hold));
  rof_register #(.W(8), .CLEAR_WHEN_IDLE(1'b1)) u_idle (.clk, .clear, .load, .d, .q(q_idle));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1; load = 0; d = 0;
    @(posedge clk); #1;
    m_hold = 0; m_idle = 0;
    for (int k = 0; k < 400; k++) begin
      clear = (($urandom % 40) == 0); load = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (clear) begin m_hold = 0; m_idle = 0; end
      else begin
        if (load) m_hold = d;
        m_idle = load ? d : 8'h00;
      end
      checks += 2;
      if (q_hold !== m_hold) begin failures++; $display("hold q=%0h expected %0h", q_hold, m_hold); end
      if (q_idle !== m_idle) begin failures++; $display("mask q=%0h expected %0h", q_idle, m_idle); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
