// End-to-end testbench of rof_system at its default parameters (N = 9,
// B = 8, 800-pixel lines). It runs all four filter programs one after the
// other (each start is a mode switch) and checks every output against a
// reference model of the filter window that uses sorting, not bit slicing:
//   mode 0  1-D rank 3 of the last nine samples
//   mode 1  1-D recursive median (four earlier outputs, five samples)
//   mode 2  2-D 3x3 rank 4 over three image lines
//   mode 3  2-D 3x3 recursive median over three image lines
// For the 2-D modes it also checks, at every interior pixel, that the result
// is the rank-order value of the 3x3 neighbourhood in image coordinates
// (with earlier outputs in the upper row and left neighbour for mode 3).
// pix_valid is dropped at random to stall the filter. It checks the sample
// period (15 or 18 cycles) when no stall intervenes, and counts how often
// each mechanism occurred: every instruction type, LOAD issued together with
// a computing-field instruction, every input_sel source, stalls, restarts
// and filled scan lines. A mechanism that never occurred is a failure.
// In parallel, the fully-pipelined processor at the top's second port set
// runs a 1-D rank-3 program with three windows in flight; each of its
// results is checked against sorting at the cycle the schedule predicts.
module tb_rof_system;
  import rof_pkg::*;

  localparam int N = 9;
  localparam int W = 800;     // must equal rof_system's LINE_W default

  logic       clk = 1'b0;
  logic       rst, start;
  logic [1:0] mode;
  logic [3:0] rank;
  logic [7:0] pix, d_out;
  logic       pix_valid, pix_ready, done;

  int checks = 0, failures = 0, cycle = 0;

  logic [41:0] fp_instruction;
  logic [7:0]  fp_d_in, fp_d_out;
  logic        fp_done;
  int          n_fp_ok = 0, n_fp_triple = 0;

  rof_system dut (.clk, .rst, .start, .mode, .rank, .pix, .pix_valid, .pix_ready, .d_out, .done,
                  .fp_instruction, .fp_d_in, .fp_d_out, .fp_done);

  // Fully-pipelined processor: 1-D N = 9 rank 3 over an 11-word data field,
  // run in parallel with the main filter. Schedule as in
  // tb_rof_processor_fp: group g of windows 3g..3g+2 starts at 12 + 24g,
  // window 3g+x (computing field x+1) copies and reads its MSB at
  // 12 + 24g + x, reads bit b 3(7-b) cycles later, polarizes two cycles after
  // each read and is DONE 24 cycles after its start.
  localparam int FG = 20;
  localparam int FLEN = 12 + 24 * FG + 30;
  localparam int FNS = 3 * FG + 11;

  initial begin
    logic [15:0] f1 [FLEN];
    logic [1:0]  f2 [FLEN];
    logic [11:0] f3 [FLEN];
    logic [11:0] f4 [FLEN];
    logic [7:0]  fd [FLEN];
    int          fj [FLEN];
    logic [7:0]  fs [FNS];
    fp_instruction = {SI1_NULL, SI2_NULL, SI3_NULL, SI4_NULL};
    fp_d_in = '0;
    for (int k = 0; k < FNS; k++) fs[k] = 8'($urandom);
    for (int c = 0; c < FLEN; c++) begin
      f1[c] = SI1_NULL; f2[c] = SI2_NULL; f3[c] = SI3_NULL; f4[c] = SI4_NULL; fd[c] = '0; fj[c] = -1;
    end
    f1[0] = si1_set(4'd3);
    for (int w = 0; w < 11; w++) begin f1[1 + w] = si1_load(4'(w)); fd[1 + w] = fs[w]; end
    for (int g = 0; g < FG; g++)
      for (int x = 0; x < 3; x++) begin
        int j, tg;
        logic [10:0] cmask;
        tg = 12 + 24 * g;
        j = 3 * g + x;
        cmask = '0;
        for (int k = 0; k < N; k++) cmask[(j + k) % 11] = 1'b1;
        f1[tg + x] = si1_copy(2'(x + 1), cmask);
        for (int b = 7; b >= 0; b--) begin
          f4[tg + x + 3 * (7 - b)] = si4_read(2'(x + 1), 8'(1 << b));
          if (b > 0) f3[tg + x + 3 * (7 - b) + 2] = si3_write(2'(x + 1), 8'((1 << b) - 1));
        end
        f2[tg + x + 24] = SI2_DONE;
        fj[tg + x + 24] = j;
        f1[tg + 3 + x] = si1_load(4'((3 * g + 11 + x) % 11));
        fd[tg + 3 + x] = fs[3 * g + 11 + x];
      end
    @(negedge rst);
    repeat (2) @(posedge clk);
    for (int c = 0; c < FLEN; c++) begin
      fp_instruction <= {f1[c], f2[c], f3[c], f4[c]};
      fp_d_in <= fd[c];
      if (f1[c] != SI1_NULL && f3[c] != SI3_NULL && f4[c] != SI4_NULL) n_fp_triple++;
      @(posedge clk);
      #1;
      if (fp_done || fj[c] >= 0) begin
        logic [7:0] v [9];
        logic [7:0] t;
        for (int k = 0; k < 9; k++) v[k] = fs[(fj[c] < 0 ? 0 : fj[c]) + k];
        for (int a = 0; a < 9; a++)
          for (int b = 0; b < 8 - a; b++)
            if (v[b] < v[b+1]) begin t = v[b]; v[b] = v[b+1]; v[b+1] = t; end
        checks++;
        if (!fp_done || fj[c] < 0 || fp_d_out !== v[2]) begin
          failures++;
          $display("pipelined processor cycle %0d: done %0d d_out %0d, window %0d expected %0d",
                   c, fp_done, fp_d_out, fj[c], v[2]);
        end else n_fp_ok++;
      end
    end
    checks++;
    if (n_fp_ok != 3 * FG) begin failures++; $display("pipelined processor: %0d results", n_fp_ok); end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_set, n_load, n_copy, n_done, n_read, n_write, n_overlap, n_stall, n_restart;
  int n_sel [4];
  int n_slfull;
  always @(posedge clk) if (!rst) begin
    instr_t i;
    i = instr_t'(dut.instruction);
    if (i.d_mode == DM_SET) n_set++;
    if (i.d_mode == DM_LOAD) begin
      n_load++;
      n_sel[dut.input_sel]++;
      if (i.c_mode == CM_READ || i.c_mode == CM_WRITE) n_overlap++;
    end
    if (i.d_mode == DM_COPYDONE && i.operand[1]) n_copy++;
    if (i.d_mode == DM_COPYDONE && i.operand[0]) n_done++;
    if (i.c_mode == CM_READ) n_read++;
    if (i.c_mode == CM_WRITE) n_write++;
    if (pix_ready && !pix_valid) n_stall++;
    if (dut.u_in.u_sl1.full && dut.u_in.u_slm.full) n_slfull++;
  end

  // ---------------- reference model ----------------
  logic [7:0] mem [N];
  logic [7:0] xs [$];     // samples taken
  logic [7:0] res [$];    // result of iteration n
  logic [7:0] outs [$];   // expected outputs at successive done pulses
  int         r_cur, m_cur, base;

  function automatic logic [7:0] rank9(input logic [7:0] v_in [9], input int r);
    logic [7:0] v [9];
    logic [7:0] t;
    v = v_in;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] < v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[r-1];
  endfunction

  function automatic logic [7:0] xat(input int k);
    return (k >= 0 && k < xs.size()) ? xs[k] : 8'h00;
  endfunction

  // y value at raster position q (mode 3): result of iteration q+W+1.
  function automatic logic [7:0] yat(input int q);
    return res[q + W + 1];
  endfunction

  // Called when sample number n has just been taken for iteration n.
  task automatic model_iteration(input int n);
    logic [7:0] od, v [9];
    int k;
    od = (n == 0) ? 8'h00 : res[n-1];    // what DONE of iteration n shows
    outs.push_back(od);
    case (m_cur)
      0: begin mem[base] = xs[n]; base = (base + 1) % N; end
      1: begin
           mem[base] = xs[n];
           mem[(base + 4) % N] = od;
           base = (base + 1) % N;
         end
      2: begin
           mem[base] = xat(n); mem[(base+1)%N] = xat(n - W); mem[(base+2)%N] = xat(n - 2*W);
           base = (base + 3) % N;
         end
      default: begin
           mem[base] = xat(n); mem[(base+1)%N] = xat(n - W);
           // median line buffer: W-2 deep, fed at each sample taken with the
           // output then on d_out (0 at the first take, then result k-2)
           k = n - (W - 3);
           mem[(base+2)%N] = (k < 2) ? 8'h00 : res[k-2];
           mem[(base+4)%N] = od;
           base = (base + 3) % N;
         end
    endcase
    for (int i = 0; i < N; i++) v[i] = mem[i];
    res.push_back(rank9(v, r_cur));
  endtask

  // Image-coordinate check of a 2-D result (iteration n, centre n-W-1).
  int n_interior;
  task automatic image_check(input int n);
    int p, row, col, idx;
    logic [7:0] v [9];
    p = n - W - 1;
    row = p / W;
    col = p % W;
    if (p < 0 || row < 1 || col < 1 || col > W - 2) return;
    idx = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        if (m_cur == 3 && (dr == -1 || (dr == 0 && dc == -1)))
          v[idx] = yat(p + dr * W + dc);
        else
          v[idx] = xat(p + dr * W + dc);
        idx++;
      end
    checks++;
    n_interior++;
    if (res[n] !== rank9(v, r_cur)) begin
      failures++;
      $display("mode %0d pixel (%0d,%0d): window model %0d, image model %0d",
               m_cur, row, col, res[n], rank9(v, r_cur));
    end
  endtask

  // ---------------- output checking ----------------
  int  got, last_done, period_ok, n_period;
  bit  stalled_since;
  always @(posedge clk) begin
    if (!rst && done) begin
      checks++;
      if (got >= outs.size()) begin
        failures++;
        $display("mode %0d: unexpected output %0d", m_cur, d_out);
      end else if (d_out !== outs[got]) begin
        failures++;
        if (failures < 20) $display("mode %0d output %0d: %0d expected %0d", m_cur, got, d_out, outs[got]);
      end
      got++;
      if (last_done >= 0 && !stalled_since) begin
        checks++;
        n_period++;
        if (cycle - last_done != period_ok) begin
          failures++;
          $display("mode %0d: period %0d expected %0d", m_cur, cycle - last_done, period_ok);
        end
      end
      last_done = cycle;
      stalled_since = 0;
    end
    if (!rst && pix_ready && !pix_valid) stalled_since = 1;
  end

  // ---------------- stimulus ----------------
  task automatic run_mode(input int m, input int r, input int nsamp);
    int n;
    m_cur = m; r_cur = r; base = 0;
    for (int i = 0; i < N; i++) mem[i] = 8'h00;
    xs.delete(); res.delete(); outs.delete();
    got = 0; last_done = -1; stalled_since = 0;
    period_ok = (m == 0 || m == 2) ? 15 : 18;
    mode <= 2'(m); rank <= 4'(r); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    n_restart++;
    n = 0;
    while (n < nsamp) begin
      logic [7:0] s;
      // impulsive noise on a smooth ramp
      s = (($urandom % 100) < 10) ? ((($urandom % 2) != 0) ? 8'hFF : 8'h00) : 8'((n * 3 + n / W * 7) & 8'hFF);
      pix <= s;
      pix_valid <= (($urandom % 100) >= 3);
      @(posedge clk);
      if (pix_valid && pix_ready) begin
        xs.push_back(s);
        model_iteration(n);
        if (m >= 2) image_check(n);
        n++;
      end
    end
    pix_valid <= 1'b0;
    // let the outputs already modelled appear (the filter stalls after them)
    repeat (60) @(posedge clk);
    checks++;
    if (got != outs.size()) begin
      failures++;
      $display("mode %0d: %0d outputs seen, %0d expected", m, got, outs.size());
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; mode = '0; rank = 4'd1; pix = '0; pix_valid = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);
    run_mode(0, 3, 200);
    run_mode(1, 5, 200);
    run_mode(2, 4, 3 * W + 20);
    run_mode(3, 5, 3 * W + 20);

    begin
      string nm [15] = '{"SET", "LOAD", "COPY", "DONE", "P_READ", "P_WRITE", "LOAD with P_READ/P_WRITE",
                         "stall", "restart", "input_sel 1", "input_sel 2", "input_sel 3", "full scan lines",
                         "pipelined results", "pipelined copy/load+write+read"};
      int    ct [15];
      ct = '{n_set, n_load, n_copy, n_done, n_read, n_write, n_overlap, n_stall, n_restart,
             n_sel[1], n_sel[2], n_sel[3], n_slfull, n_fp_ok, n_fp_triple};
      for (int i = 0; i < 15; i++) begin
        $display("mechanism %-26s %0d", nm[i], ct[i]);
        checks++;
        if (ct[i] == 0) begin failures++; $display("mechanism %s never occurred", nm[i]); end
      end
      $display("interior pixels checked %0d, periods checked %0d", n_interior, n_period);
      checks++;
      if (n_interior < W) begin failures++; $display("too few interior pixels"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
