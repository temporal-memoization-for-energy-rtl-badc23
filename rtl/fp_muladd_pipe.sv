// fp_muladd_pipe: four-stage single-precision multiply-add, q = a * b + c.
//
// The MULADD unit of the execute stage has four execution stages and accepts
// one instruction per cycle, as the design requires. This implementation
// rounds the product before the addition (not fused), flushes subnormals to
// zero and rounds to nearest-even:
//   stage 1  unpack a and b, 24 x 24 bit mantissa product
//   stage 2  normalise and round the product
//   stage 3  align, add c, normalise (tm_pkg::fp_add_norm)
//   stage 4  round and pack
// en[k] enables the register that ends stage k+1; with all enables high q
// follows the operands by 4 cycles.
module fp_muladd_pipe
  import tm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      en,
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  input  logic [FP_W-1:0] c,
  output logic [FP_W-1:0] q
);

  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;
    logic [47:0]       p;
    logic              zero;
    logic              special;
    logic [FP_W-1:0]   spec_q;
    logic [FP_W-1:0]   c;
  } s1_t;

  typedef struct packed {
    logic [FP_W-1:0] prod;
    logic [FP_W-1:0] c;
  } s2_t;

  s1_t      s1_d, s1_q;
  s2_t      s2_d, s2_q;
  fp_norm_t s3_d, s3_q;

  always_comb begin
    fp_unpacked_t ua, ub;
    ua = fp_unpack(a);
    ub = fp_unpack(b);
    s1_d.sign    = ua.sign ^ ub.sign;
    s1_d.exp     = $signed({2'b00, ua.exp}) + $signed({2'b00, ub.exp}) - 10'sd127;
    s1_d.p       = ua.man * ub.man;
    s1_d.zero    = ua.zero | ub.zero;
    s1_d.special = ua.nan | ub.nan | ua.inf | ub.inf;
    if (ua.nan || ub.nan || (ua.inf && ub.zero) || (ub.inf && ua.zero))
      s1_d.spec_q = QNAN;
    else
      s1_d.spec_q = {ua.sign ^ ub.sign, 8'hFF, 23'd0};
    s1_d.c = c;
  end

  always_comb begin
    logic [26:0]       m;
    logic signed [9:0] e;
    if (s1_q.p[47]) begin
      m = {s1_q.p[47:22], |s1_q.p[21:0]};
      e = s1_q.exp + 10'sd1;
    end else begin
      m = {s1_q.p[46:21], |s1_q.p[20:0]};
      e = s1_q.exp;
    end
    if (s1_q.special)   s2_d.prod = s1_q.spec_q;
    else if (s1_q.zero) s2_d.prod = {s1_q.sign, 31'd0};
    else                s2_d.prod = fp_round_pack(s1_q.sign, e, m);
    s2_d.c = s1_q.c;
  end

  assign s3_d = fp_add_norm(s2_q.prod, s2_q.c);

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
      if (en[3]) q    <= fp_finish(s3_q);
    end
  end

endmodule
