// Workload testbench: one SVGA frame (800 x 600 8-bit pixels) through
// rof_system at its default parameters (LINE_W = 800), for the 3x3
// rank-order filter of rank 5 and the 3x3 recursive median filter. The
// frame is synthetic (ramps and a checkerboard) with 8% salt and pepper
// noise. Every interior output is checked against a sorting reference of
// its 3x3 neighbourhood, the cycles spent per pixel must be 15 and 18, and
// the cycle count per frame is reported together with the frame rate it
// allows at a 256 MHz clock; the testbench requires at least 30 frames/s
// for the rank-order filter and 29 for the recursive median filter.
module tb_workload_svga;
  import rof_pkg::*;

  localparam int W = 800;
  localparam int H = 600;

  logic       clk = 1'b0;
  logic       rst, start;
  logic [1:0] mode;
  logic [3:0] rank;
  logic [7:0] pix, d_out;
  logic       pix_valid, pix_ready, done;

  int checks = 0, failures = 0;
  longint cycle = 0;

  logic [7:0] fp_d_out;
  logic       fp_done;

  // the pipelined processor's port set is idle here (null instructions)
  rof_system dut (.clk, .rst, .start, .mode, .rank, .pix, .pix_valid, .pix_ready,
                                .d_out, .done, .fp_instruction({SI1_NULL, SI2_NULL, SI3_NULL, SI4_NULL}),
                                .fp_d_in(8'h00), .fp_d_out, .fp_done);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] clean [W*H];
  logic [7:0] noisy [W*H];
  logic [7:0] outs  [$];    // d_out at successive done pulses

  always @(posedge clk) if (!rst && done) outs.push_back(d_out);

  function automatic logic [7:0] rank9(input logic [7:0] v_in [9], input int r);
    logic [7:0] v [9];
    logic [7:0] t;
    v = v_in;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] < v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[r-1];
  endfunction

  task automatic make_image(input int pct);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = 40 + (x * 100) / W + (y * 60) / H + (((x / 16 + y / 16) % 2) != 0 ? 20 : 0);
        clean[y*W + x] = 8'(v);
        noisy[y*W + x] = (($urandom % 100) < pct) ? ((($urandom % 2) != 0) ? 8'd255 : 8'd0) : 8'(v);
      end
  endtask

  // Result for raster centre p comes out at done pulse p + W + 2.
  function automatic logic [7:0] result_at(input int p);
    return outs[p + W + 2];
  endfunction

  task automatic run(input int m, input int r, input int pct);
    int n, bad_in, bad_out, interior;
    longint t0, t1;
    make_image(pct);
    outs.delete();
    mode <= 2'(m); rank <= 4'(r); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    n = 0;
    t0 = cycle;
    // feed the image and W+2 padding pixels to flush the last window
    while (n < W * H + W + 2) begin
      pix <= (n < W * H) ? noisy[n] : 8'h00;
      pix_valid <= 1'b1;
      @(posedge clk);
      if (pix_ready) n++;
    end
    t1 = cycle;
    pix_valid <= 1'b0;
    repeat (40) @(posedge clk);
    bad_in = 0; bad_out = 0; interior = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        int p, idx;
        logic [7:0] v [9];
        logic [7:0] e;
        p = y * W + x;
        idx = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            v[idx] = (m == 3 && (dr == -1 || (dr == 0 && dc == -1))) ? result_at(p + dr * W + dc)
                                                                      : noisy[p + dr * W + dc];
            idx++;
          end
        e = rank9(v, r);
        checks++;
        interior++;
        if (result_at(p) !== e) begin
          failures++;
          if (failures < 10) $display("mode %0d rank %0d (%0d,%0d): %0d expected %0d", m, r, y, x, result_at(p), e);
        end
        if (noisy[p] > clean[p] + 64 || clean[p] > noisy[p] + 64) bad_in++;
        if (result_at(p) > clean[p] + 64 || clean[p] > result_at(p) + 64) bad_out++;
      end
    $display("%s rank %0d, %0d%% noise: %0d interior pixels, noisy pixels %0d -> %0d, %0.2f cycles/pixel",
             (m == 3) ? "3x3 recursive median" : "3x3 rank-order", r, pct, interior, bad_in, bad_out,
             real'(t1 - t0) / real'(n));
    checks++;
    if (((t1 - t0) + n / 2) / n != ((m == 2) ? 15 : 18)) begin
      failures++;
      $display("unexpected cycles per pixel");
    end
    begin
      real fps;
      fps = 256.0e6 / real'(t1 - t0);
      $display("  %0d cycles per frame, %0.1f frames/s at 256 MHz", t1 - t0, fps);
      checks++;
      if (fps < ((m == 2) ? 30.0 : 29.0)) begin failures++; $display("frame rate too low"); end
      checks++;
      if (bad_out * 10 > bad_in) begin failures++; $display("noise not removed"); end
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; mode = '0; rank = 4'd1; pix = '0; pix_valid = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);
    run(2, 5, 8);
    run(3, 5, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
