// Shared types and constants of the DCRAM rank-order filter.
//
// The processor takes a 16-bit long instruction word with two independent
// halves that issue together: a data-field operation in bits 15..10 and a
// computing-field operation in bits 9..0.
//
//   15:14 d_mode   13:10 operand        9:8 c_mode   7:0 mask
//   00 SET   <rank>                     00 P_READ  <one-hot bit-slice>
//   01 LOAD  <address>                  01 P_WRITE <polarization mask>
//   10 COPY/DONE  operand = 1 1 c d     11 CF_NULL (mask = 1111_1111)
//   11 DF_NULL    operand = 1 1 1 1
//
// The field layout and codes are those of the published instruction format;
// c_mode 10 is unused and is treated as CF_NULL. The helper functions build
// instruction words for sequencers and testbenches.
// The package also holds the 42-bit extended instruction of the
// fully-pipelined processor (field layout as published; the numbering of the
// computing-field selects is this design's choice).
package rof_pkg;

  typedef enum logic [1:0] {
    DM_SET     = 2'b00,
    DM_LOAD    = 2'b01,
    DM_COPYDONE = 2'b10,
    DM_NULL    = 2'b11
  } d_mode_e;

  typedef enum logic [1:0] {
    CM_READ  = 2'b00,
    CM_WRITE = 2'b01,
    CM_RSVD  = 2'b10,
    CM_NULL  = 2'b11
  } c_mode_e;

  typedef struct packed {
    d_mode_e    d_mode;
    logic [3:0] operand;
    c_mode_e    c_mode;
    logic [7:0] mask;
  } instr_t;

  // Application programs run by the instruction sequencer.
  typedef enum logic [1:0] {
    APP_ROF1D = 2'd0,   // 1-D non-recursive ROF
    APP_RMF1D = 2'd1,   // 1-D recursive median filter
    APP_ROF2D = 2'd2,   // 2-D 3x3 non-recursive ROF
    APP_RMF2D = 2'd3    // 2-D 3x3 recursive median filter
  } app_e;

  localparam logic [5:0] DF_NULL = {DM_NULL, 4'b1111};
  localparam logic [9:0] CF_NULL = {CM_NULL, 8'hFF};

  function automatic logic [5:0] df_set(input logic [3:0] rank);
    return {DM_SET, rank};
  endfunction

  function automatic logic [5:0] df_load(input logic [3:0] addr);
    return {DM_LOAD, addr};
  endfunction

  function automatic logic [5:0] df_copydone(input logic c, input logic d);
    return {DM_COPYDONE, 2'b11, c, d};
  endfunction

  function automatic logic [9:0] cf_read(input logic [7:0] mask);
    return {CM_READ, mask};
  endfunction

  function automatic logic [9:0] cf_write(input logic [7:0] mask);
    return {CM_WRITE, mask};
  endfunction

  // Extended 42-bit instruction of the fully-pipelined processor: four
  // sub-instructions that issue together.
  //   41:26 SI1  000 1..1 <rank>  SET      | 001 1..1 <address> LOAD
  //              010 <c_cf> <cp_mask>  COPY | 111 1..1           SI1_NULL
  //   25:24 SI2  01 DONE | 11 SI2_NULL
  //   23:12 SI3  00 <w_cf> <mask> P_WRITE | 11 1..1 SI3_NULL
  //   11:0  SI4  00 <r_cf> <mask> P_READ  | 11 1..1 SI4_NULL
  // A computing-field select of 1, 2 or 3 names computing field 1, 2 or 3.
  localparam logic [15:0] SI1_NULL = 16'hFFFF;
  localparam logic [1:0]  SI2_NULL = 2'b11;
  localparam logic [1:0]  SI2_DONE = 2'b01;
  localparam logic [11:0] SI3_NULL = 12'hFFF;
  localparam logic [11:0] SI4_NULL = 12'hFFF;

  function automatic logic [15:0] si1_set(input logic [3:0] rank);
    return {3'b000, 9'h1FF, rank};
  endfunction

  function automatic logic [15:0] si1_load(input logic [3:0] addr);
    return {3'b001, 9'h1FF, addr};
  endfunction

  function automatic logic [15:0] si1_copy(input logic [1:0] cf, input logic [10:0] cp_mask);
    return {3'b010, cf, cp_mask};
  endfunction

  function automatic logic [11:0] si3_write(input logic [1:0] cf, input logic [7:0] mask);
    return {2'b00, cf, mask};
  endfunction

  function automatic logic [11:0] si4_read(input logic [1:0] cf, input logic [7:0] mask);
    return {2'b00, cf, mask};
  endfunction

endpackage
