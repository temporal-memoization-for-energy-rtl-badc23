// tm_pkg: types, constants and single-precision helper functions shared by
// the temporal-memoization FPU design.
//
// The execute stage holds one memoization lookup table (LUT) per floating-point
// unit. Every FPU is a four-stage pipeline with one instruction per cycle, and
// its LUT remembers the operands and results of the last four error-free
// executions. The constants below carry those numbers; the FP helper
// functions (unpack, round-and-pack) are shared by the FP pipelines.
//
// Number format: IEEE-754 binary32. This design flushes subnormal inputs and
// results to zero and rounds to nearest-even; that is its own choice, the
// arithmetic cores themselves are not specified beyond their operation and
// latency.
package tm_pkg;

  localparam int unsigned FP_W        = 32;  // single precision operands
  localparam int unsigned FPU_STAGES  = 4;   // execution stages of an FPU
  localparam int unsigned RECIP_STAGES = 16; // execution stages of RECIP
  localparam int unsigned MAX_STAGES  = RECIP_STAGES;
  localparam int unsigned LUT_DEPTH   = 4;   // FIFO entries of each LUT
  localparam int unsigned MAX_OPND    = 3;   // widest operand set (MULADD)

  // Functional units of the execute stage.
  typedef enum logic [2:0] {
    FPU_ADD    = 3'd0,
    FPU_MUL    = 3'd1,
    FPU_FP2FIX = 3'd2,
    FPU_MULADD = 3'd3,
    FPU_SQRT   = 3'd4,
    FPU_RECIP  = 3'd5
  } fpu_kind_e;

  localparam int unsigned NUM_FPU_KINDS = 6;

  // Pipeline depth of each unit.
  function automatic int unsigned fpu_stages(input fpu_kind_e k);
    return (k == FPU_RECIP) ? RECIP_STAGES : FPU_STAGES;
  endfunction

  // Operands of each unit.
  function automatic int unsigned fpu_nopnd(input fpu_kind_e k);
    case (k)
      FPU_ADD, FPU_MUL: return 2;
      FPU_MULADD:       return 3;
      default:          return 1;
    endcase
  endfunction

  // Units whose operands 0 and 1 may be swapped when matching.
  function automatic bit fpu_commutative(input fpu_kind_e k);
    return (k == FPU_ADD) || (k == FPU_MUL) || (k == FPU_MULADD);
  endfunction

  // Register map of one memoization module (word addresses).
  typedef enum logic [2:0] {
    CSR_CTRL   = 3'd0,  // [0] memoization enable, [1] commutative matching
    CSR_MASK   = 3'd1,  // masking vector: a 1 ignores that operand bit
    CSR_PL_OP0 = 3'd2,  // preload operand 0
    CSR_PL_OP1 = 3'd3,  // preload operand 1
    CSR_PL_OP2 = 3'd4,  // preload operand 2
    CSR_PL_Q   = 3'd5,  // preload result
    CSR_PL_GO  = 3'd6   // write: push the preload entry into the LUT
  } csr_addr_e;

  // Masking vectors for the two matching constraints.
  localparam logic [FP_W-1:0] MASK_EXACT  = 32'h0000_0000;
  localparam logic [FP_W-1:0] MASK_APPROX = 32'h0000_0FFF;  // 12 LSBs of the fraction

  localparam logic [FP_W-1:0] QNAN = 32'h7FC0_0000;

  // Unpacked operand: subnormals are flushed to zero.
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [23:0] man;   // hidden bit included, zero for zero/subnormal
    logic        zero;
    logic        inf;
    logic        nan;
  } fp_unpacked_t;

  function automatic fp_unpacked_t fp_unpack(input logic [FP_W-1:0] x);
    fp_unpacked_t u;
    u.sign = x[31];
    u.exp  = x[30:23];
    u.zero = (x[30:23] == 8'd0);
    u.inf  = (x[30:23] == 8'hFF) && (x[22:0] == 23'd0);
    u.nan  = (x[30:23] == 8'hFF) && (x[22:0] != 23'd0);
    u.man  = u.zero ? 24'd0 : {1'b1, x[22:0]};
    return u;
  endfunction

  // Rounds a normalised 27-bit mantissa m (m[26] is the leading one, m[2:0]
  // are guard, round and sticky) to nearest-even and packs it with a signed
  // biased exponent. Overflow gives infinity, underflow gives signed zero.
  function automatic logic [FP_W-1:0] fp_round_pack(input logic sign,
                                                    input logic signed [9:0] exp,
                                                    input logic [26:0] m);
    logic        up;
    logic [24:0] r;
    logic signed [9:0] e;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[26:3]} + {24'd0, up};
    e  = exp;
    if (r[24]) begin
      r = r >> 1;
      e = e + 10'sd1;
    end
    if (e >= 10'sd255)     return {sign, 8'hFF, 23'd0};
    else if (e <= 10'sd0)  return {sign, 31'd0};
    else                   return {sign, e[7:0], r[22:0]};
  endfunction

  // Leading-zero count of a 27-bit value (27 when zero).
  function automatic logic [4:0] lzc27(input logic [26:0] v);
    logic [4:0] n;
    n = 5'd27;
    for (int i = 0; i < 27; i++)
      if (v[i]) n = 5'(26 - i);
    return n;
  endfunction

  // Sum before rounding: sign, exponent, normalised 27-bit mantissa, and the
  // inf/NaN result when one applies.
  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;
    logic [26:0]       m;
    logic              zero;
    logic              special;
    logic [FP_W-1:0]   spec_q;
  } fp_norm_t;

  // Unrounded a + b (align with guard/round/sticky, add, normalise); the
  // same algorithm fp_add_pipe spreads over its first three stages.
  function automatic fp_norm_t fp_add_norm(input logic [FP_W-1:0] a,
                                           input logic [FP_W-1:0] b);
    fp_unpacked_t ua, ub, ux, uy;
    fp_norm_t     r;
    logic [8:0]   d;
    logic [4:0]   sh, lz;
    logic [55:0]  ext;
    logic [26:0]  al;
    logic [27:0]  sum;
    ua = fp_unpack(a);
    ub = fp_unpack(b);
    if ({ua.exp & {8{!ua.zero}}, ua.man} >= {ub.exp & {8{!ub.zero}}, ub.man}) begin
      ux = ua; uy = ub;
    end else begin
      ux = ub; uy = ua;
    end
    d   = {1'b0, ux.exp} - {1'b0, uy.exp};
    sh  = (d > 9'd31) ? 5'd31 : d[4:0];
    ext = {uy.man, 32'd0} >> sh;
    al  = {ext[55:30], |ext[29:0]};
    if (ua.sign ^ ub.sign) sum = {1'b0, ux.man, 3'b000} - {1'b0, al};
    else                   sum = {1'b0, ux.man, 3'b000} + {1'b0, al};
    lz = lzc27(sum[26:0]);
    r.sign = ux.sign;
    r.zero = (sum == 28'd0);
    if (sum[27]) begin
      r.m   = {sum[27:2], sum[1] | sum[0]};
      r.exp = $signed({2'b00, ux.exp}) + 10'sd1;
    end else begin
      r.m   = sum[26:0] << lz;
      r.exp = $signed({2'b00, ux.exp}) - $signed({5'd0, lz});
    end
    r.special = ua.nan | ub.nan | ua.inf | ub.inf;
    if (ua.nan || ub.nan || (ua.inf && ub.inf && (ua.sign != ub.sign)))
      r.spec_q = QNAN;
    else if (ua.inf)
      r.spec_q = {ua.sign, 8'hFF, 23'd0};
    else
      r.spec_q = {ub.sign, 8'hFF, 23'd0};
    return r;
  endfunction

  // Final rounding of an unrounded result.
  function automatic logic [FP_W-1:0] fp_finish(input fp_norm_t n);
    if (n.special)   return n.spec_q;
    else if (n.zero) return 32'd0;  // exact cancellation gives +0
    else             return fp_round_pack(n.sign, n.exp, n.m);
  endfunction

endpackage
