// fp_recip_pipe: sixteen-stage single-precision reciprocal, q = 1 / a.
//
// The RECIP unit of the execute stage has a latency of 16 cycles (so that
// its stages are as short as those of the four-stage units) and accepts one
// instruction per cycle; both numbers follow the design. The algorithm is
// this implementation's choice: restoring long division of 2^48 by the
// 24-bit mantissa M yields 25 quotient bits (24 mantissa bits and a guard
// bit) and a remainder whose non-zero value is the sticky bit; the result is
// rounded to nearest-even. Stage 1 unpacks and, like stages 2 to 9, does two
// quotient bits; stages 10 to 16 do one each, and stage 16 also rounds and
// packs. A mantissa of exactly 1.0 gives an exact power of two. Subnormals
// are flushed to zero: 1/0 = inf, 1/inf = 0, results below the normal range
// become zero, NaN gives the quiet NaN.
// en[k] enables the register that ends stage k+1; with all enables high q
// follows a by 16 cycles.
module fp_recip_pipe
  import tm_pkg::*;
#(
  localparam int unsigned STAGES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [STAGES-1:0] en,
  input  logic [FP_W-1:0]   a,
  output logic [FP_W-1:0]   q
);

  typedef struct packed {
    logic            sign;
    logic [23:0]     m;       // divisor mantissa
    logic [24:0]     rem;     // partial remainder, below m after each step
    logic [24:0]     quo;     // quotient bits so far
    logic [9:0]      exp;     // biased result exponent (signed)
    logic            special;
    logic [FP_W-1:0] spec_q;
  } st_t;

  function automatic st_t div_step(input st_t s);
    st_t         r;
    logic [24:0] rem2;
    r    = s;
    rem2 = {s.rem[23:0], 1'b0};
    if (rem2 >= {1'b0, s.m}) begin
      r.rem = rem2 - {1'b0, s.m};
      r.quo = {s.quo[23:0], 1'b1};
    end else begin
      r.rem = rem2;
      r.quo = {s.quo[23:0], 1'b0};
    end
    return r;
  endfunction

  // quotient bits done in stage k (0-based): 2 in stages 0..8, 1 in 9..15
  function automatic int iters(input int k);
    return (k < 9) ? 2 : 1;
  endfunction

  st_t st_d [STAGES-1];
  st_t st_q [STAGES-1];
  logic [FP_W-1:0] q_d;

  always_comb begin
    fp_unpacked_t ua;
    st_t          s;
    ua = fp_unpack(a);
    s  = '0;
    s.sign = ua.sign;
    s.m    = ua.man;
    s.rem  = 25'h080_0000;   // 1.0 on the scale of m
    s.exp  = 10'd253 - {2'b00, ua.exp};
    s.special = ua.zero | ua.inf | ua.nan | (ua.man[22:0] == 23'd0);
    if (ua.nan)       s.spec_q = QNAN;
    else if (ua.zero) s.spec_q = {ua.sign, 8'hFF, 23'd0};
    else if (ua.inf)  s.spec_q = {ua.sign, 31'd0};
    else if (ua.exp >= 8'd254) s.spec_q = {ua.sign, 31'd0};   // 2^-127 flushes
    else              s.spec_q = {ua.sign, 8'd254 - ua.exp, 23'd0};
    for (int i = 0; i < iters(0); i++) s = div_step(s);
    st_d[0] = s;
    for (int k = 1; k < STAGES - 1; k++) begin
      s = st_q[k-1];
      for (int i = 0; i < iters(k); i++) s = div_step(s);
      st_d[k] = s;
    end
    s = st_q[STAGES-2];
    for (int i = 0; i < iters(STAGES - 1); i++) s = div_step(s);
    if (s.special) q_d = s.spec_q;
    else           q_d = fp_round_pack(s.sign, $signed(s.exp), {s.quo, s.rem != '0, 1'b0});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < STAGES - 1; k++) st_q[k] <= '0;
      q <= '0;
    end else begin
      for (int k = 0; k < STAGES - 1; k++) if (en[k]) st_q[k] <= st_d[k];
      if (en[STAGES-1]) q <= q_d;
    end
  end

endmodule
