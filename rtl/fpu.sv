// fpu: single-precision floating point unit of the core, purely
// combinational.
//
// Operands and results are IEEE 754 single precision words (sign bit 31,
// biased exponent 30:23, fraction 22:0). The operation comes from the
// instruction word, bits 9:7: fadd (a + b), frsub (b - a), fmul (a * b),
// fdiv (b / a), fcmp, flt (signed integer a to float), fint (float a to
// signed integer, rounded toward zero) and fsqrt (square root of a). fcmp
// writes 1 or 0 for the condition in bits 6:4: un (unordered), lt, eq, le,
// gt, ne, ge, each testing b against a.
//
// How it works: each operand is unpacked into a 24-bit significand with the
// hidden one and an exponent. Every operation is turned into an exact or
// sticky-extended integer significand times a power of two (aligned sum,
// 48-bit product, 64/24-bit quotient with a sticky remainder bit, restoring
// square root); a common pack step normalises it, rounds to nearest even and
// handles overflow to infinity and underflow to zero.
//
// Special values: a denormal or NaN operand of an arithmetic operation, and
// the invalid cases (inf - inf, 0 * inf, 0/0, inf/inf, square root of a
// negative number), give the quiet NaN 0xFFC00000; division of a non-zero
// number by zero gives a signed infinity. fint saturates to 0x7FFFFFFF or
// 0x80000000. Exception flags are not produced.
//
// The number format, the value rules and the operation list follow the
// document. It relies on the standard for the arithmetic itself and gives no
// circuit; the latencies (4 to 28 cycles) are enforced by the stall controller
// of the core, so this unit may compute in one cycle. The operand order of
// frsub, fdiv and fcmp, the NaN pattern and the saturation values are taken
// from the MicroBlaze architecture, not from the document.
module fpu
  import mb_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result
);

  localparam logic [31:0] QNAN = 32'hFFC0_0000;

  typedef struct packed {
    logic        s;
    logic [7:0]  e;
    logic [22:0] f;
  } fp_t;

  fp_t fa, fb;
  assign fa = a;
  assign fb = b;

  function automatic logic is_nan (input fp_t x); return x.e == 8'hFF && x.f != '0; endfunction
  function automatic logic is_inf (input fp_t x); return x.e == 8'hFF && x.f == '0; endfunction
  function automatic logic is_zero(input fp_t x); return x.e == 8'h00 && x.f == '0; endfunction
  function automatic logic is_den (input fp_t x); return x.e == 8'h00 && x.f != '0; endfunction
  function automatic logic [23:0] sig(input fp_t x);
    return (x.e == 8'h00) ? 24'd0 : {1'b1, x.f};
  endfunction

  // Value m * 2^e (m an integer, bit 0 may be a sticky bit) rounded to the
  // nearest even single-precision number.
  function automatic logic [31:0] pack(input logic s, input int e, input logic [63:0] m);
    int          p, be;
    logic [63:0] n;
    logic [24:0] r;
    logic        g, st;
    if (m == '0) return {s, 31'd0};
    p = 0;
    for (int i = 0; i < 64; i++) if (m[i]) p = i;
    n  = m << (63 - p);
    g  = n[39];
    st = |n[38:0];
    r  = {1'b0, n[63:40]};
    be = e + p + 127;
    if (g && (st || r[0])) r = r + 1'b1;
    if (r[24]) begin
      r  = r >> 1;
      be = be + 1;
    end
    if (be >= 255) return {s, 8'hFF, 23'd0};
    if (be <= 0)   return {s, 31'd0};
    return {s, be[7:0], r[22:0]};
  endfunction

  function automatic logic [31:0] f_add(input fp_t x, input fp_t y);
    int          ex, ey, d;
    logic [63:0] mx, my, m;
    logic        s;
    if (is_nan(x) || is_nan(y) || is_den(x) || is_den(y)) return QNAN;
    if (is_inf(x) && is_inf(y)) return (x.s == y.s) ? {x.s, 8'hFF, 23'd0} : QNAN;
    if (is_inf(x)) return x;
    if (is_inf(y)) return y;
    if (is_zero(x) && is_zero(y)) return {x.s & y.s, 31'd0};
    if (is_zero(x)) return y;
    if (is_zero(y)) return x;
    // Put the larger magnitude in x
    if ({y.e, y.f} > {x.e, x.f}) begin
      fp_t t;
      t = x; x = y; y = t;
    end
    ex = int'(x.e);
    ey = int'(y.e);
    d  = ex - ey;
    if (d > 40) return x;
    mx = 64'(sig(x)) << d;
    my = 64'(sig(y));
    s  = x.s;
    if (x.s == y.s) m = mx + my;
    else            m = mx - my;
    if (m == '0) return 32'd0;
    return pack(s, ey - 150, m);
  endfunction

  function automatic logic [31:0] f_mul(input fp_t x, input fp_t y);
    logic s;
    s = x.s ^ y.s;
    if (is_nan(x) || is_nan(y) || is_den(x) || is_den(y)) return QNAN;
    if ((is_inf(x) && is_zero(y)) || (is_zero(x) && is_inf(y))) return QNAN;
    if (is_inf(x) || is_inf(y)) return {s, 8'hFF, 23'd0};
    if (is_zero(x) || is_zero(y)) return {s, 31'd0};
    return pack(s, int'(x.e) + int'(y.e) - 300, 64'(sig(x)) * 64'(sig(y)));
  endfunction

  // n / d
  function automatic logic [31:0] f_div(input fp_t n, input fp_t d);
    logic        s;
    logic [63:0] q, r;
    s = n.s ^ d.s;
    if (is_nan(n) || is_nan(d) || is_den(n) || is_den(d)) return QNAN;
    if ((is_zero(n) && is_zero(d)) || (is_inf(n) && is_inf(d))) return QNAN;
    if (is_inf(n) || is_zero(d)) return {s, 8'hFF, 23'd0};
    if (is_zero(n) || is_inf(d)) return {s, 31'd0};
    q = (64'(sig(n)) << 39) / 64'(sig(d));
    r = (64'(sig(n)) << 39) % 64'(sig(d));
    return pack(s, int'(n.e) - int'(d.e) - 40, {q[62:0], r != '0});
  endfunction

  function automatic logic [31:0] f_sqrt(input fp_t x);
    int          k;
    logic [63:0] m;
    logic [35:0] rem;
    logic [31:0] root;
    if (is_nan(x) || is_den(x)) return QNAN;
    if (is_zero(x)) return x;
    if (x.s) return QNAN;
    if (is_inf(x)) return x;
    // x = sig * 2^(e-150); make the exponent even and the radicand wide
    k = int'(x.e) - 150 - 38;
    m = 64'(sig(x)) << 38;
    if (k % 2 != 0) begin
      m = m << 1;
      k = k - 1;
    end
    rem  = '0;
    root = '0;
    for (int i = 31; i >= 0; i--) begin
      logic [35:0] trial;
      rem   = {rem[33:0], m[2*i+1 -: 2]};
      trial = {2'b00, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[30:0], 1'b1};
      end else begin
        root = {root[30:0], 1'b0};
      end
    end
    return pack(1'b0, k / 2 - 1, {31'd0, root, rem != '0});
  endfunction

  function automatic logic [31:0] f_flt(input logic [31:0] x);
    logic [31:0] mag;
    mag = x[31] ? -x : x;
    return pack(x[31], 0, 64'(mag));
  endfunction

  function automatic logic [31:0] f_int(input fp_t x);
    int          sh;
    logic [31:0] mag;
    if (is_nan(x)) return 32'h7FFF_FFFF;
    if (x.e >= 8'd158) return x.s ? 32'h8000_0000 : 32'h7FFF_FFFF;
    if (x.e < 8'd127) return '0;
    sh  = int'(x.e) - 150;
    mag = (sh >= 0) ? (32'(sig(x)) << sh) : (32'(sig(x)) >> (-sh));
    return x.s ? -mag : mag;
  endfunction

  // Ordering key: a larger key is a larger number; both zeros map alike.
  function automatic logic [31:0] key(input fp_t x);
    if (is_zero(x)) return 32'h8000_0000;
    return x.s ? ~x : {1'b1, x[30:0]};
  endfunction

  function automatic logic f_cmp(input logic [2:0] cond, input fp_t x, input fp_t y);
    logic un, lt, eq;
    un = is_nan(x) || is_nan(y);
    lt = key(y) < key(x);   // b < a
    eq = key(y) == key(x);
    unique case (cond)
      3'd0: return un;
      3'd1: return !un && lt;
      3'd2: return !un && eq;
      3'd3: return !un && (lt || eq);
      3'd4: return !un && !lt && !eq;
      3'd5: return un || !eq;
      3'd6: return !un && !lt;
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    unique case (fpu_op_e'(instr[9:7]))
      FOP_ADD:  result = f_add(fa, fb);
      FOP_RSUB: result = f_add({~fa.s, fa.e, fa.f}, fb);
      FOP_MUL:  result = f_mul(fa, fb);
      FOP_DIV:  result = f_div(fb, fa);
      FOP_CMP:  result = {31'd0, f_cmp(instr[6:4], fa, fb)};
      FOP_FLT:  result = f_flt(a);
      FOP_INT:  result = f_int(fa);
      default:  result = f_sqrt(fa);
    endcase
  end

endmodule
