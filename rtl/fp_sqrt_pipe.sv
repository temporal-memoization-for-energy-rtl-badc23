// fp_sqrt_pipe: four-stage single-precision square root, q = sqrt(a).
//
// The SQRT unit of the execute stage has four execution stages and accepts
// one instruction per cycle, as the design requires. The algorithm is this
// implementation's choice: a bit-by-bit restoring integer square root of the
// mantissa (shifted left by 25 or 26 so that the exponent becomes even)
// yields 25 root bits, 24 mantissa bits plus a guard bit; a non-zero
// remainder is the sticky bit, and the result is rounded to nearest-even.
// The 25 iterations are spread 7/6/6/6 over the four stages, the last stage
// also rounds and packs. Subnormals are flushed to zero; sqrt(-0) = -0,
// sqrt(+inf) = +inf, a negative operand or NaN gives the quiet NaN.
// en[k] enables the register that ends stage k+1; with all enables high q
// follows a by 4 cycles.
module fp_sqrt_pipe
  import tm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      en,
  input  logic [FP_W-1:0] a,
  output logic [FP_W-1:0] q
);

  localparam int unsigned ITER = 25;   // root bits

  typedef struct packed {
    logic [49:0]     x;       // radicand, consumed two bits per iteration
    logic [26:0]     rem;     // partial remainder
    logic [24:0]     root;    // partial root
    logic [7:0]      exp;     // biased result exponent
    logic            special;
    logic [FP_W-1:0] spec_q;
  } st_t;

  // one restoring step: bring down two radicand bits, try root*4+1
  function automatic st_t sqrt_step(input st_t s);
    st_t         r;
    logic [28:0] rem2, trial, diff;
    r     = s;
    rem2  = {s.rem, s.x[49:48]};
    trial = {2'b00, s.root, 2'b01};
    diff  = rem2 - trial;
    r.x   = {s.x[47:0], 2'b00};
    if (rem2 >= trial) begin
      r.rem  = diff[26:0];
      r.root = {s.root[23:0], 1'b1};
    end else begin
      r.rem  = rem2[26:0];
      r.root = {s.root[23:0], 1'b0};
    end
    return r;
  endfunction

  function automatic st_t steps(input st_t s, input int n);
    st_t r;
    r = s;
    for (int i = 0; i < n; i++) r = sqrt_step(r);
    return r;
  endfunction

  st_t s0, s1_d, s1_q, s2_d, s2_q, s3_d, s3_q;
  logic [FP_W-1:0] s4_d;

  always_comb begin
    fp_unpacked_t      ua;
    logic signed [9:0] e;
    ua = fp_unpack(a);
    e  = $signed({2'b00, ua.exp}) - 10'sd127;
    s0 = '0;
    // odd exponent: use 2*mantissa and an even exponent
    s0.x   = e[0] ? {ua.man, 26'd0} : {1'b0, ua.man, 25'd0};
    s0.exp = 8'((e >>> 1) + 10'sd127);
    s0.special = ua.zero | ua.inf | ua.nan | ua.sign;
    if (ua.zero)                s0.spec_q = {ua.sign, 31'd0};
    else if (ua.nan || ua.sign) s0.spec_q = QNAN;
    else                        s0.spec_q = {1'b0, 8'hFF, 23'd0};
    s1_d = steps(s0, 7);
    s2_d = steps(s1_q, 6);
    s3_d = steps(s2_q, 6);
  end

  always_comb begin
    st_t s;
    s = steps(s3_q, ITER - 19);
    if (s.special) s4_d = s.spec_q;
    else           s4_d = fp_round_pack(1'b0, $signed({2'b00, s.exp}),
                                        {s.root, s.rem != '0, 1'b0});
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
