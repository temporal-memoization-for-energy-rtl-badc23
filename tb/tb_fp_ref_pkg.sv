// tb_fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Works through double precision: operands are widened to real, the
// operation is done in real arithmetic (exact for a product of two singles,
// and for a sum when the exponents differ by less than 29), and the result
// is rounded back to single precision to nearest-even by integer operations
// on the double's bit pattern. Subnormal inputs and results are flushed to
// zero, matching the convention of the RTL. Also provides random operand
// generators.
package tb_fp_ref_pkg;

  function automatic real f2r(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) return 0.0;
    d = {x[31], 11'(x[30:23]) + 11'd896, x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic bit is_nan(input logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 23'd0;
  endfunction

  function automatic bit is_inf(input logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 23'd0;
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] r;
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    if (is_inf(a) && is_inf(b) && a[31] != b[31]) return 32'h7FC0_0000;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    r = r2f(f2r(a) + f2r(b));
    if (r[30:0] == 31'd0) r = 32'd0;   // the RTL returns +0 for a zero sum
    return r;
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] r;
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    if ((is_inf(a) && b[30:23] == 8'd0) || (is_inf(b) && a[30:23] == 8'd0)) return 32'h7FC0_0000;
    if (is_inf(a) || is_inf(b)) return {a[31] ^ b[31], 8'hFF, 23'd0};
    r = r2f(f2r(a) * f2r(b));
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) r = {a[31] ^ b[31], 31'd0};
    return r;
  endfunction

  function automatic logic [31:0] ref_muladd(input logic [31:0] a, input logic [31:0] b,
                                            input logic [31:0] c);
    return ref_add(ref_mul(a, b), c);
  endfunction

  // float to int32, toward zero, saturating
  function automatic logic [31:0] ref_fp2fix(input logic [31:0] a);
    real r;
    r = f2r(a);
    if (is_nan(a)) return 32'd0;
    if (r >= 2147483648.0)  return 32'h7FFF_FFFF;
    if (r <= -2147483648.0) return 32'h8000_0000;
    return 32'($rtoi(r));
  endfunction

  // operand b for a sum with a: random, exact negation, near-cancelling,
  // or (one in 20) a special value; exponents differ by at most 26
  function automatic logic [31:0] pick_b(input logic [31:0] a);
    int          e;
    logic [31:0] b;
    case ($urandom_range(0, 19))
      0: return {1'($urandom), 8'hFF, 23'd0};
      1: return {1'($urandom), 8'hFF, 23'($urandom) | 23'd1};
      2: return {1'($urandom), 31'd0};
      3: return {~a[31], a[30:0]};
      4: return {~a[31], a[30:8], 8'($urandom)};
      default: begin
        e = int'(a[30:23]) + int'($urandom_range(0, 52)) - 26;
        if (e < 1) e = 1;
        if (e > 254) e = 254;
        b = rand_f(e, e);
        return b;
      end
    endcase
  endfunction

  // random normal single with biased exponent in [emin, emax]
  function automatic logic [31:0] rand_f(input int emin, input int emax);
    logic [31:0] x;
    x[31]    = 1'($urandom);
    x[30:23] = 8'(emin + int'($urandom_range(0, emax - emin)));
    x[22:0]  = 23'($urandom);
    return x;
  endfunction

endpackage
