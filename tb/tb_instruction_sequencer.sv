// Testbench of instruction_sequencer (N = 9, B = 8): for each of the four
// applications the issued instruction words, input_sel and sample handshake
// are compared, cycle by cycle over 40 iterations, with the published
// programs written out literally below (masks as printed, addresses
// advancing by 1 or 3 modulo 9). pix_valid is dropped at random: the
// sequencer must then issue DF_NULL|CF_NULL and hold its place.
module tb_instruction_sequencer;
  import rof_pkg::*;
  logic clk = 0, rst, start, in_valid, in_ready, pix_push, out_push, running;
  app_e mode, app;
  logic [3:0] rank;
  logic [15:0] instruction;
  logic [1:0] input_sel;
  int checks = 0, failures = 0;

  instruction_sequencer dut (.clk, .rst, .start, .mode, .rank, .in_valid, .in_ready, .instruction,
                             .input_sel, .pix_push, .out_push, .app, .running);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [5:0] CP = {2'b10, 4'b1110};
  localparam logic [5:0] DN = {2'b10, 4'b1101};
  localparam logic [5:0] DX = {2'b11, 4'b1111};
  localparam logic [9:0] CX = {2'b11, 8'hFF};
  function automatic logic [9:0] R(input logic [7:0] m); return {2'b00, m}; endfunction
  function automatic logic [9:0] Wr(input logic [7:0] m); return {2'b01, m}; endfunction
  function automatic logic [5:0] L(input int a); return {2'b01, 4'(a % 9)}; endfunction

  // expected {instruction, input_sel} of step s with window base i
  function automatic logic [17:0] prog(input app_e m, input int s, input int i);
    logic [15:0] x; logic [1:0] sel;
    sel = 0;
    case (m)
      APP_ROF1D: case (s)
        0: x = {L(i), R(8'b00000001)};  1: x = {CP, R(8'b10000000)};  2: x = {DN, Wr(8'b01111111)};
        3: x = {DX, R(8'b01000000)};  4: x = {DX, Wr(8'b00111111)};  5: x = {DX, R(8'b00100000)};
        6: x = {DX, Wr(8'b00011111)}; 7: x = {DX, R(8'b00010000)};   8: x = {DX, Wr(8'b00001111)};
        9: x = {DX, R(8'b00001000)};  10: x = {DX, Wr(8'b00000111)}; 11: x = {DX, R(8'b00000100)};
        12: x = {DX, Wr(8'b00000011)}; 13: x = {DX, R(8'b00000010)}; default: x = {DX, Wr(8'b00000001)};
      endcase
      APP_RMF1D: case (s)
        0: x = {L(i), CX};  1: x = {DN, CX};  2: begin x = {L(i + 4), CX}; sel = 1; end
        3: x = {CP, R(8'b10000000)};  4: x = {DX, Wr(8'b01111111)};  5: x = {DX, R(8'b01000000)};
        6: x = {DX, Wr(8'b00111111)}; 7: x = {DX, R(8'b00100000)};   8: x = {DX, Wr(8'b00011111)};
        9: x = {DX, R(8'b00010000)};  10: x = {DX, Wr(8'b00001111)}; 11: x = {DX, R(8'b00001000)};
        12: x = {DX, Wr(8'b00000111)}; 13: x = {DX, R(8'b00000100)}; 14: x = {DX, Wr(8'b00000011)};
        15: x = {DX, R(8'b00000010)};  16: x = {DX, Wr(8'b00000001)}; default: x = {DX, R(8'b00000001)};
      endcase
      APP_ROF2D: case (s)
        0: x = {L(i), R(8'b00000010)};
        1: begin x = {L(i + 1), Wr(8'b00000001)}; sel = 1; end
        2: begin x = {L(i + 2), R(8'b00000001)}; sel = 2; end
        3: x = {CP, R(8'b10000000)};  4: x = {DN, Wr(8'b01111111)};  5: x = {DX, R(8'b01000000)};
        6: x = {DX, Wr(8'b00111111)}; 7: x = {DX, R(8'b00100000)};   8: x = {DX, Wr(8'b00011111)};
        9: x = {DX, R(8'b00010000)};  10: x = {DX, Wr(8'b00001111)}; 11: x = {DX, R(8'b00001000)};
        12: x = {DX, Wr(8'b00000111)}; 13: x = {DX, R(8'b00000100)}; default: x = {DX, Wr(8'b00000011)};
      endcase
      default: case (s)
        0: x = {L(i), Wr(8'b00000001)};
        1: begin x = {L(i + 1), R(8'b00000001)}; sel = 1; end
        2: begin x = {L(i + 2), CX}; sel = 2; end
        3: x = {DN, CX};
        4: begin x = {L(i + 4), CX}; sel = 3; end
        5: x = {CP, R(8'b10000000)};  6: x = {DX, Wr(8'b01111111)};  7: x = {DX, R(8'b01000000)};
        8: x = {DX, Wr(8'b00111111)}; 9: x = {DX, R(8'b00100000)};   10: x = {DX, Wr(8'b00011111)};
        11: x = {DX, R(8'b00010000)}; 12: x = {DX, Wr(8'b00001111)}; 13: x = {DX, R(8'b00001000)};
        14: x = {DX, Wr(8'b00000111)}; 15: x = {DX, R(8'b00000100)}; 16: x = {DX, Wr(8'b00000011)};
        default: x = {DX, R(8'b00000010)};
      endcase
    endcase
    return {x, sel};
  endfunction

  task automatic run(input app_e m);
    int period, s, i, iters, take_s;
    bit two_d, stalled, pre;
    two_d  = (m == APP_ROF2D || m == APP_RMF2D);
    period = (m == APP_ROF1D || m == APP_ROF2D) ? 15 : 18;
    take_s = two_d ? period - 1 : 0;
    mode <= m; rank <= 4'(5); start <= 1;
    @(posedge clk); start <= 0;
    #1;
    checks++;
    if (instruction !== {2'b00, 4'd5, CX}) begin failures++; $display("SET expected, got %h", instruction); end
    @(posedge clk); #1;
    s = two_d ? period - 1 : 0; i = 0; iters = 0; pre = two_d;
    // the 2-D programs issue their last step once before the first iteration
    while (iters < 40) begin
      logic [17:0] e;
      in_valid = (($urandom % 5) != 0);
      #1;
      stalled = (s == take_s) && !in_valid;
      e = stalled ? {DX, CX, 2'b00} : prog(m, s, i);
      checks += 3;
      if (instruction !== e[17:2]) begin
        failures++;
        $display("app %0d step %0d base %0d: instruction %h expected %h", m, s, i, instruction, e[17:2]);
      end
      if (!stalled && e[17:16] == 2'b01 && input_sel !== e[1:0]) begin
        failures++; $display("app %0d step %0d: input_sel %0d expected %0d", m, s, input_sel, e[1:0]);
      end
      if (in_ready !== (s == take_s)) begin failures++; $display("in_ready wrong at step %0d", s); end
      @(posedge clk); #1;
      if (!stalled) begin
        if (s == period - 1) begin
          s = 0;
          if (pre) pre = 0;
          else begin
            i = (i + (two_d ? 3 : 1)) % 9;
            iters++;
          end
        end else s++;
      end
    end
  endtask

  initial begin
    rst = 1; start = 0; in_valid = 0; rank = 0; mode = APP_ROF1D;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int m = 0; m < 4; m++) run(app_e'(m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
