// fp_add_pipe: four-stage single-precision floating-point adder (q = a + b).
//
// The execute stage's ADD unit has four execution stages and accepts one
// instruction per cycle; that latency and rate follow the design, the
// internal split below is this implementation's own:
//   stage 1  unpack, order the operands by magnitude, exponent difference
//   stage 2  align the smaller mantissa (guard/round/sticky kept), add/subtract
//   stage 3  normalise (one-bit right shift or leading-zero left shift)
//   stage 4  round to nearest-even, pack
// Subnormal inputs and results are flushed to zero; NaN inputs and inf-inf
// give the quiet NaN 0x7FC00000.
//
// Interface: en[k] is the clock enable of the register that ends stage k+1.
// The memoized FPU drives en[1..3] low for an instruction that hit in its LUT,
// which is how the remaining stages are clock-gated. With all enables high the
// result of the operands applied in cycle t appears on q in cycle t+4.
module fp_add_pipe
  import tm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      en,
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] q
);

  // ---------------- stage 1: unpack and order ----------------
  typedef struct packed {
    logic        sign;      // sign of the larger operand
    logic [7:0]  exp;       // exponent of the larger operand
    logic [23:0] big;       // larger mantissa
    logic [23:0] little;    // smaller mantissa
    logic [4:0]  diff;      // exponent difference, clamped to 31
    logic        sub;       // effective subtraction
    logic        special;   // result fixed by inf/NaN
    logic [31:0] spec_q;
  } s1_t;

  s1_t s1_d, s1_q;

  always_comb begin
    fp_unpacked_t ua, ub, ux, uy;
    logic [8:0] d;
    ua = fp_unpack(a);
    ub = fp_unpack(b);
    // magnitude compare on {exp, mantissa}; flushed subnormals compare as zero
    if ({ua.exp & {8{!ua.zero}}, ua.man} >= {ub.exp & {8{!ub.zero}}, ub.man}) begin
      ux = ua; uy = ub;
    end else begin
      ux = ub; uy = ua;
    end
    d = {1'b0, ux.exp} - {1'b0, uy.exp};
    s1_d.sign  = ux.sign;
    s1_d.exp   = ux.exp;
    s1_d.big   = ux.man;
    s1_d.little = uy.zero ? 24'd0 : uy.man;
    s1_d.diff  = (d > 9'd31) ? 5'd31 : d[4:0];
    s1_d.sub   = ua.sign ^ ub.sign;
    s1_d.special = ua.nan | ub.nan | ua.inf | ub.inf;
    if (ua.nan || ub.nan || (ua.inf && ub.inf && (ua.sign != ub.sign)))
      s1_d.spec_q = QNAN;
    else if (ua.inf)
      s1_d.spec_q = {ua.sign, 8'hFF, 23'd0};
    else
      s1_d.spec_q = {ub.sign, 8'hFF, 23'd0};
  end

  // ---------------- stage 2: align and add ----------------
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [27:0] sum;       // 1 carry bit, 24 mantissa bits, guard, round, sticky
    logic        special;
    logic [31:0] spec_q;
  } s2_t;

  s2_t s2_d, s2_q;

  always_comb begin
    logic [55:0] ext;
    logic [26:0] al;
    ext = {s1_q.little, 32'd0} >> s1_q.diff;
    al  = {ext[55:30], |ext[29:0]};
    s2_d.sign    = s1_q.sign;
    s2_d.exp     = s1_q.exp;
    s2_d.special = s1_q.special;
    s2_d.spec_q  = s1_q.spec_q;
    if (s1_q.sub) s2_d.sum = {1'b0, s1_q.big, 3'b000} - {1'b0, al};
    else          s2_d.sum = {1'b0, s1_q.big, 3'b000} + {1'b0, al};
  end

  // ---------------- stage 3: normalise ----------------
  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;
    logic [26:0]       m;
    logic              zero;
    logic              special;
    logic [31:0]       spec_q;
  } s3_t;

  s3_t s3_d, s3_q;

  always_comb begin
    logic [4:0] lz;
    lz = lzc27(s2_q.sum[26:0]);
    s3_d.sign    = s2_q.sign;
    s3_d.special = s2_q.special;
    s3_d.spec_q  = s2_q.spec_q;
    s3_d.zero    = (s2_q.sum == 28'd0);
    if (s2_q.sum[27]) begin
      s3_d.m   = {s2_q.sum[27:2], s2_q.sum[1] | s2_q.sum[0]};
      s3_d.exp = $signed({2'b00, s2_q.exp}) + 10'sd1;
    end else begin
      s3_d.m   = s2_q.sum[26:0] << lz;
      s3_d.exp = $signed({2'b00, s2_q.exp}) - $signed({5'd0, lz});
    end
  end

  // ---------------- stage 4: round and pack ----------------
  logic [FP_W-1:0] s4_d;

  always_comb begin
    if (s3_q.special)   s4_d = s3_q.spec_q;
    else if (s3_q.zero) s4_d = 32'd0;  // exact cancellation gives +0
    else                s4_d = fp_round_pack(s3_q.sign, s3_q.exp, s3_q.m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
      q    <= '0;
    end else begin
      if (en[0]) s1_q <= s1_d;
      if (en[1]) s2_q <= s2_d;
      if (en[2]) s3_q <= s3_d;
      if (en[3]) q    <= s4_d;
    end
  end

endmodule
