// Testbench of rof_processor: runs the 1-D rank-order program (N = 9,
// B = 8) straight from its instruction list and checks every result against
// a sorting reference model of the nine-word window.
//   * the worked example of the algorithm: samples 7 5 11 14 2 8 3 with
//     rank 1 give 14;
//   * random samples with rank 3, the published 15-cycle iteration period
//     measured between done pulses;
//   * random idle instructions inserted between any two instructions, which
//     must not change any result;
//   * SET with a new rank clears the window and the output.
module tb_rof_processor;
  import rof_pkg::*;

  localparam int N = 9;
  localparam int B = 8;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] instruction;
  logic [7:0]  d_in, d_out;
  logic        done;

  int checks = 0, failures = 0;
  int cycle = 0;

  rof_processor dut (.clk, .rst, .instruction, .d_in, .d_out, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference window and expected results.
  logic [7:0] mem [N];
  logic [7:0] expq [$];
  int         last_done = -1;
  int         period_checks = 0;
  bit         check_period = 0;
  int         idle_prob = 0;

  function automatic logic [7:0] rank_of(input int r);
    logic [7:0] v [N];
    logic [7:0] t;
    for (int i = 0; i < N; i++) v[i] = mem[i];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N - 1 - i; j++)
        if (v[j] < v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return (r < 1) ? 8'hFF : v[r-1];
  endfunction

  // Compare each new output.
  bit armed = 0;
  always @(posedge clk) begin
    if (armed && done) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected done at cycle %0d", cycle);
      end else begin
        logic [7:0] e;
        e = expq.pop_front();
        if (d_out !== e) begin
          failures++;
          $display("cycle %0d: d_out=%0d expected %0d", cycle, d_out, e);
        end
      end
      if (check_period && last_done >= 0) begin
        checks++;
        period_checks++;
        if (cycle - last_done != 15) begin
          failures++;
          $display("iteration period %0d, expected 15", cycle - last_done);
        end
      end
      last_done = cycle;
    end
  end

  // Idle instructions may be inserted anywhere except between the LSB read
  // of one iteration and its DONE, which must follow that read by exactly
  // two instructions so that OUTR catches the complete shift register.
  task automatic issue(input logic [15:0] ins, input logic [7:0] din = 8'h00,
                       input bit may_idle = 1'b1);
    instruction <= ins;
    d_in        <= din;
    @(posedge clk);
    if (may_idle && idle_prob > 0 && ($urandom % 100) < idle_prob) begin
      instruction <= {DF_NULL, CF_NULL};
      d_in        <= 8'($urandom);
      repeat (1 + $urandom % 3) @(posedge clk);
    end
  endtask

  // One iteration of the 1-D program, loading sample s at address a.
  task automatic iteration(input logic [3:0] a, input logic [7:0] s, input int r);
    issue({df_load(a), cf_read(8'h01)}, s, 1'b0);
    issue({df_copydone(1'b1, 1'b0), cf_read(8'h80)}, 8'h00, 1'b0);
    issue({df_copydone(1'b0, 1'b1), cf_write(8'h7F)});
    for (int b = 6; b >= 1; b--) begin
      issue({DF_NULL, cf_read(8'(1 << b))});
      issue({DF_NULL, cf_write(8'((1 << b) - 1))});
    end
    mem[a] = s;
    expq.push_back(rank_of(r));
  endtask

  task automatic set_rank(input int r);
    issue({df_set(4'(r)), CF_NULL});
    for (int i = 0; i < N; i++) mem[i] = 8'h00;
    expq.delete();
    expq.push_back(8'h00);   // first DONE shows the cleared result
    last_done = -1;
  endtask

  // Drain: the result of the last iteration needs its LSB read and a DONE.
  task automatic drain();
    issue({DF_NULL, cf_read(8'h01)}, 8'h00, 1'b0);
    issue({DF_NULL, CF_NULL}, 8'h00, 1'b0);
    issue({df_copydone(1'b0, 1'b1), CF_NULL});
    issue({DF_NULL, CF_NULL});
    issue({DF_NULL, CF_NULL});
  endtask

  initial begin
    logic [7:0] ex [7] = '{8'd7, 8'd5, 8'd11, 8'd14, 8'd2, 8'd8, 8'd3};
    int ai;
    instruction = {DF_NULL, CF_NULL};
    d_in = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    armed = 1;

    // Worked example, rank 1: the largest of 7 5 11 14 2 8 3 (and two zeros).
    set_rank(1);
    for (int i = 0; i < 7; i++) iteration(4'(i), ex[i], 1);
    drain();
    checks++;
    if (d_out !== 8'd14) begin
      failures++;
      $display("worked example gave %0d, expected 14", d_out);
    end

    // Random samples, rank 3, with period check.
    set_rank(3);
    check_period = 1;
    ai = 0;
    for (int k = 0; k < 60; k++) begin
      iteration(4'(ai), 8'($urandom), 3);
      ai = (ai + 1) % N;
    end
    check_period = 0;
    drain();

    // Idle cycles inserted anywhere, several ranks.
    idle_prob = 30;
    for (int r = 1; r <= 9; r += 4) begin
      set_rank(r);
      ai = 0;
      for (int k = 0; k < 30; k++) begin
        // many equal values to exercise ties
        iteration(4'(ai), ($urandom % 2) ? 8'($urandom % 4) : 8'($urandom), r);
        ai = (ai + 1) % N;
      end
      drain();
    end

    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d results never appeared", expq.size());
    end
    checks++;
    if (period_checks < 50) begin
      failures++;
      $display("period measured only %0d times", period_checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
