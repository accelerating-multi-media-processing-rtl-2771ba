// memo_pkg: types, constants and helper functions shared by the memoing
// execution units.
//
// A memoing unit pairs a multi-cycle computation unit (integer multiplier,
// floating-point multiplier, floating-point divider) with a small cache-like
// MEMO-TABLE that remembers the operands and result of earlier operations.
// This package holds the operation encoding, the hashing used to index the
// table, and the IEEE-754 double-precision helpers that the floating-point
// units and the trivial-operation detector share.
//
// Floating-point convention (a choice of this design, not of the method):
// subnormal inputs are read as zero of the same sign and results that would
// be subnormal are flushed to zero; every NaN result is the canonical quiet
// NaN; rounding is round-to-nearest-even.
package memo_pkg;

  // Operand and result width: 64-bit integers and IEEE double precision.
  localparam int unsigned XLEN = 64;

  // Which multi-cycle operation a unit performs.
  typedef enum logic [1:0] {
    OP_IMUL = 2'd0,   // integer multiply, low 64 bits of the product
    OP_FMUL = 2'd1,   // double-precision multiply
    OP_FDIV = 2'd2    // double-precision divide
  } op_e;

  localparam int unsigned NUM_OPS = 3;

  // Where a returned result came from.
  typedef enum logic [1:0] {
    SRC_CU      = 2'd0,  // the computation unit finished (memo miss)
    SRC_MEMO    = 2'd1,  // MEMO-TABLE hit
    SRC_TRIVIAL = 2'd2   // trivial operation answered directly
  } src_e;

  // One result returned toward write-back.
  typedef struct packed {
    logic             valid;
    logic [XLEN-1:0]  result;
    src_e             src;
  } wb_t;

  // ---------------------------------------------------------------------
  // IEEE-754 double helpers
  // ---------------------------------------------------------------------
  localparam logic [63:0] FP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] FP_ONE  = 64'h3FF0_0000_0000_0000;

  typedef enum logic [1:0] {
    FC_ZERO = 2'd0,   // zero or subnormal (read as zero)
    FC_NORM = 2'd1,
    FC_INF  = 2'd2,
    FC_NAN  = 2'd3
  } fclass_e;

  function automatic fclass_e fp_class(input logic [63:0] x);
    if (x[62:52] == 11'd0)         return FC_ZERO;
    else if (x[62:52] != 11'h7FF)  return FC_NORM;
    else if (x[51:0] == 52'd0)     return FC_INF;
    else                           return FC_NAN;
  endfunction

  function automatic logic [63:0] fp_zero(input logic s);
    return {s, 63'd0};
  endfunction

  function automatic logic [63:0] fp_inf(input logic s);
    return {s, 11'h7FF, 52'd0};
  endfunction

  // Round a normalised significand (hidden bit at position 52) to nearest
  // even and pack it; exp is the biased exponent before rounding. Overflow
  // gives infinity, a result below the normal range gives signed zero.
  function automatic logic [63:0] fp_round_pack(input logic              s,
                                                input logic signed [13:0] exp,
                                                input logic [52:0]         mant,
                                                input logic                guard,
                                                input logic                sticky);
    logic [53:0]        m;
    logic signed [13:0] e;
    m = {1'b0, mant};
    e = exp;
    if (guard && (sticky || mant[0])) m = m + 54'd1;
    if (m[53]) begin
      m = m >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047)   return fp_inf(s);
    else if (e <= 14'sd0) return fp_zero(s);
    else                  return {s, e[10:0], m[51:0]};
  endfunction

  // ---------------------------------------------------------------------
  // MEMO-TABLE index hashing
  //   integer operands: XOR of the IDX_W least significant bits of both
  //   floating-point operands: XOR of the IDX_W most significant mantissa bits
  // ---------------------------------------------------------------------
  function automatic logic [15:0] memo_hash(input op_e op,
                                            input logic [63:0] a,
                                            input logic [63:0] b,
                                            input int unsigned idx_w);
    logic [15:0] h;
    h = '0;
    for (int unsigned i = 0; i < idx_w && i < 16; i++) begin
      if (op == OP_IMUL) h[i] = a[i] ^ b[i];
      else               h[i] = a[51-idx_w+1+i] ^ b[51-idx_w+1+i];
    end
    return h;
  endfunction

endpackage
