// Instruction sequencer: dedicated hardware that runs the filter programs.
//
// After start it issues SET <rank> once and then repeats the instruction
// loop of the selected application forever. Each loop iteration produces one
// filtered sample; the sequencer also does the bookkeeping the programs leave
// to it: the window base address i, the LOAD addresses derived from it and the
// input_sel of the input multiplexer.
//
//   app    period  loop (P_READ b = one-hot bit b, P_WRITE b = bits below b)
//   ROF1D  2B-1    LOAD i|P_READ 0, COPY|P_READ B-1, DONE|P_WRITE B-1,
//                  then P_READ/P_WRITE pairs for bits B-2..1;  i = i+1 mod N
//   RMF1D  2B+2    LOAD i (pix), DONE, LOAD i+(N-1)/2 (d_out), COPY|P_READ B-1,
//                  then P_WRITE/P_READ pairs down to P_READ 0;  i = i+1 mod N
//   ROF2D  2B-1    LOAD i|P_READ 1, LOAD i+1|P_WRITE 1, LOAD i+2|P_READ 0,
//                  COPY|P_READ B-1, DONE|P_WRITE B-1, then pairs down to
//                  P_WRITE 2;  i = i+3 mod 9
//   RMF2D  2B+2    LOAD i|P_WRITE 1, LOAD i+1|P_READ 0, LOAD i+2, DONE,
//                  LOAD i+4 (d_out), COPY|P_READ B-1, then pairs down to
//                  P_READ 1;  i = i+3 mod 9
// These are the published programs (B = 8, N = 9, 3x3 window for 2-D); the
// step-by-step table is written as a function of B.
//
// One input sample is taken per iteration: at step 0 in the 1-D programs (it
// goes straight to d_in), at the last step in the 2-D programs (it enters the
// D register and scan lines before the LOADs of the next iteration). If no
// sample is offered at that step the sequencer stalls: it issues
// DF_NULL|CF_NULL and stays at the step. In the 2-D programs the last step is
// also issued once right after SET, so the first pixel is taken before the
// first LOAD. Stalling and this start-up are this design's choices.
// Outputs are combinational from the step state; in_ready is high at the
// sample step, and the sample is taken when in_valid is also high.
module instruction_sequencer
  import rof_pkg::*;
#(
  parameter int unsigned N = 9,
  parameter int unsigned B = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  app_e        mode,
  input  logic [3:0]  rank,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [15:0] instruction,
  output logic [1:0]  input_sel,
  output logic        pix_push,
  output logic        out_push,
  output app_e        app,
  output logic        running
);

  localparam int unsigned PMAX = 2 * B + 2;
  localparam int unsigned SW   = $clog2(PMAX);
  localparam int unsigned K1   = (N - 1) / 2;

  typedef enum logic [1:0] {S_IDLE, S_SET, S_RUN} state_e;

  state_e        state;
  logic [SW-1:0] step;
  logic [3:0]    base;
  logic [3:0]    rank_q;
  logic [SW-1:0] period, take_step;
  logic          take, advance;
  logic          is2d, last;
  // In the 2-D programs the last step is issued once before the first
  // iteration; that pass must not move the window base.
  logic          first_it;

  function automatic logic [9:0] rd(input int b);
    return cf_read(8'(1 << b));
  endfunction

  function automatic logic [9:0] wrm(input int b);
    return cf_write(8'((1 << b) - 1));
  endfunction

  function automatic logic [3:0] addr_mod(input logic [3:0] a, input int k);
    int s;
    s = int'(a) + k;
    if (s >= int'(N)) s = s - int'(N);
    return 4'(s);
  endfunction

  always_comb begin
    unique case (app)
      APP_ROF1D, APP_ROF2D: period = SW'(2 * B - 1);
      default:              period = SW'(2 * B + 2);
    endcase
    take_step = is2d ? period - 1'b1 : '0;
  end

  assign in_ready = (state == S_RUN) && (step == take_step);
  assign take     = in_ready && in_valid;
  assign advance  = (state == S_RUN) && (!in_ready || in_valid);
  assign pix_push = take;
  assign out_push = take && (app == APP_RMF2D);
  assign running  = (state == S_RUN);


  assign is2d = (app == APP_ROF2D) || (app == APP_RMF2D);
  assign last = (step == period - 1'b1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= S_IDLE;
      step     <= '0;
      base     <= '0;
      rank_q   <= '0;
      app      <= APP_ROF1D;
      first_it <= 1'b0;
    end else if (start) begin
      state    <= S_SET;
      app      <= mode;
      rank_q   <= rank;
      base     <= '0;
      step     <= '0;
      first_it <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_SET: begin
          state    <= S_RUN;
          step     <= is2d ? period - 1'b1 : '0;
          first_it <= is2d;
        end
        S_RUN: if (advance) begin
          step <= last ? '0 : step + 1'b1;
          if (last) begin
            first_it <= 1'b0;
            if (!first_it) base <= is2d ? addr_mod(base, 3) : addr_mod(base, 1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Instruction of the current step.
  always_comb begin
    logic [5:0] df;
    logic [9:0] cf;
    int         m;
    df        = DF_NULL;
    cf        = CF_NULL;
    input_sel = 2'd0;
    m         = 0;
    if (state == S_SET) begin
      df = df_set(rank_q);
    end else if (state == S_RUN && advance) begin
      unique case (app)
        APP_ROF1D: begin
          m = int'(step) - 3;
          if (step == 0)      begin df = df_load(base);          cf = rd(0);     end
          else if (step == 1) begin df = df_copydone(1'b1, 1'b0); cf = rd(B - 1); end
          else if (step == 2) begin df = df_copydone(1'b0, 1'b1); cf = wrm(B - 1); end
          else cf = (m % 2 == 0) ? rd(int'(B) - 2 - m / 2) : wrm(int'(B) - 2 - m / 2);
        end
        APP_RMF1D: begin
          m = int'(step) - 4;
          if (step == 0)      begin df = df_load(base); input_sel = 2'd0; end
          else if (step == 1) df = df_copydone(1'b0, 1'b1);
          else if (step == 2) begin df = df_load(addr_mod(base, K1)); input_sel = 2'd1; end
          else if (step == 3) begin df = df_copydone(1'b1, 1'b0); cf = rd(B - 1); end
          else cf = (m % 2 == 0) ? wrm(int'(B) - 1 - m / 2) : rd(int'(B) - 1 - (m + 1) / 2);
        end
        APP_ROF2D: begin
          m = int'(step) - 5;
          if (step == 0)      begin df = df_load(base);              input_sel = 2'd0; cf = rd(1);  end
          else if (step == 1) begin df = df_load(addr_mod(base, 1)); input_sel = 2'd1; cf = wrm(1); end
          else if (step == 2) begin df = df_load(addr_mod(base, 2)); input_sel = 2'd2; cf = rd(0);  end
          else if (step == 3) begin df = df_copydone(1'b1, 1'b0); cf = rd(B - 1); end
          else if (step == 4) begin df = df_copydone(1'b0, 1'b1); cf = wrm(B - 1); end
          else cf = (m % 2 == 0) ? rd(int'(B) - 2 - m / 2) : wrm(int'(B) - 2 - m / 2);
        end
        default: begin // APP_RMF2D
          m = int'(step) - 6;
          if (step == 0)      begin df = df_load(base);              input_sel = 2'd0; cf = wrm(1); end
          else if (step == 1) begin df = df_load(addr_mod(base, 1)); input_sel = 2'd1; cf = rd(0);  end
          else if (step == 2) begin df = df_load(addr_mod(base, 2)); input_sel = 2'd2; end
          else if (step == 3) df = df_copydone(1'b0, 1'b1);
          else if (step == 4) begin df = df_load(addr_mod(base, 4)); input_sel = 2'd3; end
          else if (step == 5) begin df = df_copydone(1'b1, 1'b0); cf = rd(B - 1); end
          else cf = (m % 2 == 0) ? wrm(int'(B) - 1 - m / 2) : rd(int'(B) - 2 - m / 2);
        end
      endcase
    end
    instruction = {df, cf};
  end

endmodule
