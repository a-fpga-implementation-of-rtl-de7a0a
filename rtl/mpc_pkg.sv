// mpc_pkg: types, constants and small helper functions shared by the
// constrained-MPC quadratic-programming accelerator.
//
// All numbers handled by the datapath are IEEE-754 single precision words
// (1 sign bit, 8-bit exponent, 23-bit mantissa), the format the accelerator
// is specified for. The floating point unit flushes subnormal values to zero
// and does not generate NaN; the comparison helpers below therefore only need
// to order finite numbers and signed zeros.
//
// The helpers are purely combinational and are used by the solver for the
// step-length search and the convergence test, which only need compares and
// sign flips and so do not occupy the floating point unit.
//
// The single precision format follows the document; the type encodings and
// helpers are this design's own.
package mpc_pkg;

  typedef logic [31:0] fp32_t;

  // Operations of the floating point unit.
  typedef enum logic [1:0] {
    FP_ADD = 2'd0,
    FP_SUB = 2'd1,
    FP_MUL = 2'd2,
    FP_DIV = 2'd3
  } fp_op_e;

  // Which problem array a host write addresses (QP  min 1/2 z'Qz + c'z
  // subject to Jz <= g: Hessian Q, linear term c, constraints J, bounds g).
  typedef enum logic [1:0] {
    LD_Q = 2'd0,
    LD_C = 2'd1,
    LD_J = 2'd2,
    LD_G = 2'd3
  } ld_sel_e;

  // Frequently used constants.
  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_MAX  = 32'h7F7F_FFFF;   // largest finite value

  // Absolute value and negation by sign-bit manipulation.
  function automatic fp32_t fp_abs(fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // a < 0 (negative zero counts as zero).
  function automatic logic fp_is_neg(fp32_t a);
    return a[31] && (a[30:0] != 31'd0);
  endfunction

  // a < b for finite operands. Sign-magnitude order: for two non-negative
  // values the bit pattern orders like an integer, for two negative values
  // the order is reversed.
  function automatic logic fp_lt(fp32_t a, fp32_t b);
    logic an, bn;
    an = fp_is_neg(a);
    bn = fp_is_neg(b);
    if (an != bn) return an;
    if (!an) return a[30:0] < b[30:0];
    return a[30:0] > b[30:0];
  endfunction

  // Exact conversion of a small unsigned integer (below 2**16) to single.
  function automatic fp32_t fp_from_uint(logic [15:0] v);
    int unsigned msb;
    logic [22:0] man;
    if (v == 16'd0) return FP_ZERO;
    msb = 0;
    for (int b = 0; b < 16; b++) if (v[b]) msb = b;
    man = 23'(({7'd0, v} << (23 - msb)));
    return {1'b0, 8'(127 + msb), man};
  endfunction

endpackage
