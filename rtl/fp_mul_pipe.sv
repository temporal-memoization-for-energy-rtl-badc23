// fp_mul_pipe: four-stage single-precision floating-point multiplier (q = a * b).
//
// The MUL unit of the execute stage has four execution stages and accepts one
// instruction per cycle, as the design requires; the split is this
// implementation's own:
//   stage 1  unpack, sign, sum of exponents, special cases
//   stage 2  24 x 24 bit mantissa product
//   stage 3  normalise to a 27-bit mantissa with guard, round and sticky bits
//   stage 4  round to nearest-even, pack
// Subnormals are flushed to zero; NaN or 0*inf give the quiet NaN.
//
// Interface and timing as fp_add_pipe: en[k] enables the register that ends
// stage k+1, and with all enables high q follows the operands by 4 cycles.
module fp_mul_pipe
  import tm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      en,
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] q
);

  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;     // biased exponent of the product
    logic [23:0]       ma;
    logic [23:0]       mb;
    logic              zero;
    logic              special;
    logic [31:0]       spec_q;
  } s1_t;

  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;
    logic [47:0]       p;
    logic              zero;
    logic              special;
    logic [31:0]       spec_q;
  } s2_t;

  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;
    logic [26:0]       m;
    logic              zero;
    logic              special;
    logic [31:0]       spec_q;
  } s3_t;

  s1_t s1_d, s1_q;
  s2_t s2_d, s2_q;
  s3_t s3_d, s3_q;
  logic [FP_W-1:0] s4_d;

  // stage 1
  always_comb begin
    fp_unpacked_t ua, ub;
    ua = fp_unpack(a);
    ub = fp_unpack(b);
    s1_d.sign = ua.sign ^ ub.sign;
    s1_d.exp  = $signed({2'b00, ua.exp}) + $signed({2'b00, ub.exp}) - 10'sd127;
    s1_d.ma   = ua.man;
    s1_d.mb   = ub.man;
    s1_d.zero = ua.zero | ub.zero;
    s1_d.special = ua.nan | ub.nan | ua.inf | ub.inf;
    if (ua.nan || ub.nan || (ua.inf && ub.zero) || (ub.inf && ua.zero))
      s1_d.spec_q = QNAN;
    else
      s1_d.spec_q = {ua.sign ^ ub.sign, 8'hFF, 23'd0};
  end

  // stage 2
  always_comb begin
    s2_d.sign    = s1_q.sign;
    s2_d.exp     = s1_q.exp;
    s2_d.p       = s1_q.ma * s1_q.mb;
    s2_d.zero    = s1_q.zero;
    s2_d.special = s1_q.special;
    s2_d.spec_q  = s1_q.spec_q;
  end

  // stage 3
  always_comb begin
    s3_d.sign    = s2_q.sign;
    s3_d.zero    = s2_q.zero;
    s3_d.special = s2_q.special;
    s3_d.spec_q  = s2_q.spec_q;
    if (s2_q.p[47]) begin
      s3_d.m   = {s2_q.p[47:22], |s2_q.p[21:0]};
      s3_d.exp = s2_q.exp + 10'sd1;
    end else begin
      s3_d.m   = {s2_q.p[46:21], |s2_q.p[20:0]};
      s3_d.exp = s2_q.exp;
    end
  end

  // stage 4
  always_comb begin
    if (s3_q.special)   s4_d = s3_q.spec_q;
    else if (s3_q.zero) s4_d = {s3_q.sign, 31'd0};
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
