// fp2fix_pipe: four-stage conversion of a single-precision float to a signed
// 32-bit integer (q = trunc(a)).
//
// This is the FP2FIX unit of the execute stage: four execution stages, one
// instruction per cycle, as the design requires. The result format is this
// implementation's choice: rounding toward zero, saturation to the int32
// range, NaN converts to 0, subnormals to 0.
//   stage 1  unpack, unbiased exponent
//   stage 2  shift the mantissa to the binary point, detect saturation
//   stage 3  apply the sign
//   stage 4  select saturated / special value
// en[k] enables the register that ends stage k+1; with all enables high q
// follows a by 4 cycles.
module fp2fix_pipe
  import tm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      en,
  input  logic [FP_W-1:0] a,
  output logic [FP_W-1:0] q
);

  typedef struct packed {
    logic              sign;
    logic signed [9:0] sh;    // unbiased exponent
    logic [23:0]       man;
    logic              nan;
  } s1_t;

  typedef struct packed {
    logic        sign;
    logic [31:0] mag;
    logic        sat;
    logic        nan;
  } s2_t;

  typedef struct packed {
    logic        sign;
    logic [31:0] val;
    logic        sat;
    logic        nan;
  } s3_t;

  s1_t s1_d, s1_q;
  s2_t s2_d, s2_q;
  s3_t s3_d, s3_q;
  logic [FP_W-1:0] s4_d;

  always_comb begin
    fp_unpacked_t ua;
    ua = fp_unpack(a);
    s1_d.sign = ua.sign;
    s1_d.sh   = $signed({2'b00, ua.exp}) - 10'sd127;
    s1_d.man  = ua.man;
    s1_d.nan  = ua.nan;
  end

  always_comb begin
    s2_d.sign = s1_q.sign;
    s2_d.nan  = s1_q.nan;
    s2_d.sat  = (s1_q.sh >= 10'sd31);
    if (s1_q.sh < 10'sd0 || s1_q.man == 24'd0)
      s2_d.mag = 32'd0;
    else if (s1_q.sh >= 10'sd23)
      s2_d.mag = {8'd0, s1_q.man} << (s1_q.sh[4:0] - 5'd23);
    else
      s2_d.mag = {8'd0, s1_q.man} >> (5'd23 - s1_q.sh[4:0]);
  end

  always_comb begin
    s3_d.sign = s2_q.sign;
    s3_d.sat  = s2_q.sat;
    s3_d.nan  = s2_q.nan;
    s3_d.val  = s2_q.sign ? (~s2_q.mag + 32'd1) : s2_q.mag;
  end

  always_comb begin
    if (s3_q.nan)      s4_d = 32'd0;
    else if (s3_q.sat) s4_d = s3_q.sign ? 32'h8000_0000 : 32'h7FFF_FFFF;
    else               s4_d = s3_q.val;
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
