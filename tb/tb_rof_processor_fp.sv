// Testbench of rof_processor_fp, the fully-pipelined filter, running the
// 1-D non-recursive filter with N = 9 (11-word data field, delta = 1).
// The program is generated here from the schedule of three interleaved
// windows: after SET and eleven LOADs, group g of windows j = 3g, 3g+1,
// 3g+2 starts at cycle T0 + 24g; window j = 3g + x uses computing field
// x + 1 and issues
//   COPY (mask of words j..j+8 mod 11) + P_READ MSB at T0 + 24g + x,
//   P_READ of bit b at T0 + 24g + x + 3(7 - b),
//   P_WRITE below bit b two cycles after that read (b = 7..1),
//   DONE at T0 + 24g + x + 24,
// and the three new samples of the next group are LOADed at T0 + 24g + 3..5
// into the words of the three oldest samples. Every cycle thus holds one
// read and, in steady state, one write and one copy or load, in different
// fields. Each rank 1..9 is run on fresh random samples (uniform, or drawn
// from a few values so that ties are frequent); every done is checked
// against a sorting reference, at the cycle the schedule predicts, i.e.
// three results per 24 cycles.
module tb_rof_processor_fp;
  import rof_pkg::*;

  localparam int N = 9;
  localparam int M = 11;
  localparam int B = 8;
  localparam int G = 12;                 // groups of three windows per run
  localparam int T0 = 12;
  localparam int LEN = T0 + 24 * G + 30;
  localparam int NS = 3 * G + 8 + 3;      // samples needed

  logic         clk = 1'b0;
  logic         rst;
  logic [41:0]  instruction;
  logic [B-1:0] d_in, d_out;
  logic         done;

  int checks = 0, failures = 0;

  rof_processor_fp dut (.clk, .rst, .instruction, .d_in, .d_out, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] si1 [LEN];
  logic [1:0]  si2 [LEN];
  logic [11:0] si3 [LEN];
  logic [11:0] si4 [LEN];
  logic [B-1:0] dins [LEN];
  int           exp_j [LEN];
  logic [B-1:0] s [NS];

  function automatic logic [B-1:0] rank_of(input int j, input int r);
    logic [B-1:0] v [N];
    logic [B-1:0] t;
    for (int k = 0; k < N; k++) v[k] = s[j + k];
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N - 1 - a; b++)
        if (v[b] < v[b+1]) begin t = v[b]; v[b] = v[b+1]; v[b+1] = t; end
    return v[r-1];
  endfunction

  task automatic build(input int r);
    for (int c = 0; c < LEN; c++) begin
      si1[c] = SI1_NULL; si2[c] = SI2_NULL; si3[c] = SI3_NULL; si4[c] = SI4_NULL;
      dins[c] = B'($urandom); exp_j[c] = -1;
    end
    si1[0] = si1_set(4'(r));
    for (int w = 0; w < M; w++) begin
      si1[1 + w] = si1_load(4'(w));
      dins[1 + w] = s[w];
    end
    for (int g = 0; g < G; g++) begin
      int tg;
      tg = T0 + 24 * g;
      for (int x = 0; x < 3; x++) begin
        int j;
        logic [10:0] cmask;
        j = 3 * g + x;
        cmask = '0;
        for (int k = 0; k < N; k++) cmask[(j + k) % M] = 1'b1;
        si1[tg + x] = si1_copy(2'(x + 1), cmask);
        for (int b = B - 1; b >= 0; b--) begin
          int tr;
          tr = tg + x + 3 * (B - 1 - b);
          si4[tr] = si4_read(2'(x + 1), 8'(1 << b));
          if (b > 0) si3[tr + 2] = si3_write(2'(x + 1), 8'((1 << b) - 1));
        end
        si2[tg + x + 24] = SI2_DONE;
        exp_j[tg + x + 24] = j;
        // new samples for the next group replace the three oldest
        si1[tg + 3 + x] = si1_load(4'((3 * g + M + x) % M));
        dins[tg + 3 + x] = s[3 * g + M + x];
      end
    end
  endtask

  task automatic run(input int r, input bit ties);
    int seen;
    for (int k = 0; k < NS; k++) s[k] = ties ? B'(($urandom % 4) * 60) : B'($urandom);
    build(r);
    seen = 0;
    for (int c = 0; c < LEN; c++) begin
      instruction <= {si1[c], si2[c], si3[c], si4[c]};
      d_in <= dins[c];
      @(posedge clk);
      #1;
      if (done || exp_j[c] >= 0) begin
        checks++;
        if (!done || exp_j[c] < 0) begin
          failures++;
          $display("rank %0d cycle %0d: done %0d, expected window %0d", r, c, done, exp_j[c]);
        end else begin
          seen++;
          if (d_out !== rank_of(exp_j[c], r)) begin
            failures++;
            $display("rank %0d window %0d: %0d expected %0d", r, exp_j[c], d_out, rank_of(exp_j[c], r));
          end
        end
      end
    end
    checks++;
    if (seen != 3 * G) begin
      failures++;
      $display("rank %0d: %0d results, expected %0d", r, seen, 3 * G);
    end
  endtask

  initial begin
    rst = 1'b1;
    instruction = {SI1_NULL, SI2_NULL, SI3_NULL, SI4_NULL};
    d_in = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    for (int r = 1; r <= N; r++) begin
      run(r, 1'b0);
      run(r, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
