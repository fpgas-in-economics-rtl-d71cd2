// vfi_pkg: shared types, constants and fixed-point arithmetic of the value
// function iteration (VFI) accelerator.
//
// Number format: every real quantity (grid values, value function, wealth,
// transition weights, exponents) is a signed two's-complement fixed-point
// number with FX_FRAC fractional bits in an FX_W-bit word (Q15.16 by default).
// The arithmetic helpers saturate instead of wrapping, so an overflow pins a
// value at the most positive or most negative code. FX_MIN doubles as the
// "minus infinity" objective value of an infeasible choice (non-positive
// consumption).
//
// The operator latencies are the clock counts printed in the objective
// function pipeline diagram of the design (subtract 8, power 33, multiply 5,
// add 5, stage 60). The number format itself is this design's choice; the
// source of the architecture does not state one.
package vfi_pkg;

  parameter int FX_W    = 32;
  parameter int FX_FRAC = 16;

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_MAX = fx_t'({1'b0, {(FX_W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(FX_W-1){1'b0}}});

  // Operator latencies in clock cycles.
  parameter int SUB_LAT   = 8;   // subtract w - k'
  parameter int POW_LAT   = 33;  // power function
  parameter int MUL_LAT   = 5;   // multiply
  parameter int ADD_LAT   = 5;   // add
  parameter int SEL_LAT   = 5;   // index selection and memory access
  parameter int OBJ_LAT   = SUB_LAT + POW_LAT + MUL_LAT + ADD_LAT;  // 51
  parameter int CMP_LAT   = 4;   // comparison and output
  parameter int STAGE_LAT = SEL_LAT + OBJ_LAT + CMP_LAT;          // 60

  // Power function internals: fractional bits of log2 and of exp2.
  parameter int POW_LOG_BITS = 15;
  parameter int POW_EXP_BITS = 15;

  // 2^(2^-i) in unsigned Q2.30, i = 1..15 (rounded to nearest). exp2 of a
  // binary fraction is the product of the entries whose bit is set.
  function automatic logic [31:0] exp2_root(input int i);
    case (i)
      1:  return 32'h5a82799a;
      2:  return 32'h4c1bf829;
      3:  return 32'h45cae0f2;
      4:  return 32'h42d561b4;
      5:  return 32'h4166c34c;
      6:  return 32'h40b268fa;
      7:  return 32'h4058f6a8;
      8:  return 32'h402c6be9;
      9:  return 32'h4016321b;
      10: return 32'h400b1818;
      11: return 32'h40058bce;
      12: return 32'h4002c5d8;
      13: return 32'h400162e8;
      14: return 32'h4000b173;
      15: return 32'h400058b9;
      default: return 32'h40000000;
    endcase
  endfunction

  function automatic fx_t fx_sat(input logic signed [2*FX_W-1:0] v);
    if (v > (2*FX_W)'(FX_MAX)) return FX_MAX;
    if (v < (2*FX_W)'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] s;
    s = (2*FX_W)'(a) + (2*FX_W)'(b);
    return fx_sat(s);
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] s;
    s = (2*FX_W)'(a) - (2*FX_W)'(b);
    return fx_sat(s);
  endfunction

  // Product truncated towards minus infinity, then saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = (2*FX_W)'(a) * (2*FX_W)'(b);
    return fx_sat(p >>> FX_FRAC);
  endfunction

  // Host write targets.
  typedef enum logic [2:0] {
    HOST_KGRID = 3'd0,  // capital grid k'(i), address = i
    HOST_V0    = 3'd1,  // initial value function V0(k', z'), address = {z', k'}
    HOST_W     = 3'd2,  // wealth w(k, z), address = {z, k}
    HOST_BQ    = 3'd3,  // beta * Q(z', z), address = {z, z'}
    HOST_PARAM = 3'd4   // address 0: 1 - eta, address 1: 1 / (1 - eta)
  } host_sel_e;

endpackage
