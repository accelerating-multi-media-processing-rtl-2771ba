// tb_ref_pkg: reference models used by the testbenches.
//
// The floating-point references use the simulator's own double-precision
// arithmetic (real), so they are independent of the RTL datapaths; they
// apply the RTL's documented conventions on top: subnormal inputs read as
// zero, subnormal results flushed to zero, every NaN the canonical quiet
// NaN. The trivial-operation reference restates the rules from the
// operation's definition. rand_* helpers generate operands.
package tb_ref_pkg;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] ONE  = 64'h3FF0_0000_0000_0000;

  function automatic bit is_nan(input logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] != 0;
  endfunction

  function automatic bit is_inf(input logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] == 0;
  endfunction

  function automatic bit is_zero_daz(input logic [63:0] x);
    return x[62:52] == 11'h000;
  endfunction

  function automatic logic [63:0] daz(input logic [63:0] x);
    return is_zero_daz(x) ? {x[63], 63'd0} : x;
  endfunction

  function automatic logic [63:0] ftz_nan(input logic [63:0] r);
    if (is_nan(r))      return QNAN;
    if (is_zero_daz(r)) return {r[63], 63'd0};
    return r;
  endfunction

  function automatic logic [63:0] ref_fmul(input logic [63:0] a, input logic [63:0] b);
    real ra, rb;
    if (is_nan(a) || is_nan(b)) return QNAN;
    ra = $bitstoreal(daz(a));
    rb = $bitstoreal(daz(b));
    return ftz_nan($realtobits(ra * rb));
  endfunction

  function automatic logic [63:0] ref_fdiv(input logic [63:0] a, input logic [63:0] b);
    real ra, rb;
    logic [63:0] da, db;
    if (is_nan(a) || is_nan(b)) return QNAN;
    da = daz(a);
    db = daz(b);
    if (is_zero_daz(da) && is_zero_daz(db)) return QNAN;
    if (is_inf(da) && is_inf(db)) return QNAN;
    if (is_zero_daz(db)) return {a[63] ^ b[63], 11'h7FF, 52'd0};
    ra = $bitstoreal(da);
    rb = $bitstoreal(db);
    return ftz_nan($realtobits(ra / rb));
  endfunction

  function automatic logic [63:0] ref_imul(input logic [63:0] a, input logic [63:0] b);
    logic [127:0] p;
    p = {64'd0, a} * {64'd0, b};
    return p[63:0];
  endfunction

  // op: 0 = integer multiply, 1 = fp multiply, 2 = fp divide
  function automatic bit ref_trivial(input int op, input logic [63:0] a, input logic [63:0] b);
    bit za, zb, na, nb;
    za = is_zero_daz(a);
    zb = is_zero_daz(b);
    na = !za && !is_inf(a) && !is_nan(a);
    nb = !zb && !is_inf(b) && !is_nan(b);
    case (op)
      0:       return a == 0 || b == 0 || a == 1 || b == 1;
      1:       return (za && (zb || nb)) || (zb && na) ||
                      (b == ONE && na) || (a == ONE && nb);
      default: return (za && (nb || is_inf(b))) || (b == ONE && na);
    endcase
  endfunction

  // A random normal double with an exponent within +-span of 1.0.
  function automatic logic [63:0] rand_norm(input int span);
    logic [63:0] x;
    int e;
    e = 1023 + int'($urandom % (2 * span + 1)) - span;
    x = {$urandom, $urandom};
    x[62:52] = 11'(e);
    return x;
  endfunction

endpackage
