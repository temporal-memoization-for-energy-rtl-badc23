// fp_recip_pipe_tb: self-checking test of the sixteen-stage reciprocal.
// Streams one operand per cycle (normals over the whole exponent range,
// powers of two, zeros, infinities, NaNs) and checks every result against
// the double-precision reciprocal rounded to single,
// exactly sixteen cycles after issue. Then checks that the stage enables freeze
// the pipeline.
module fp_recip_pipe_tb;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] en = 16'hFFFF;
  logic [31:0] a = '0, q;
  int          checks = 0, failures = 0;
  logic [31:0] hist[$];

  fp_recip_pipe dut (.clk, .rst_n, .en, .a, .q);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_recip(input logic [31:0] x);
    if (is_nan(x)) return 32'h7FC0_0000;
    if (x[30:23] == 8'd0) return {x[31], 8'hFF, 23'd0};
    if (is_inf(x)) return {x[31], 31'd0};
    return r2f(1.0 / f2r(x));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (hist.size() == 16) begin
        checks++;
        if (q !== hist[0]) begin
          failures++;
          if (failures < 10) $display("recip mismatch: got %h expected %h", q, hist[0]);
        end
        void'(hist.pop_front());
      end
      case ($urandom_range(0, 19))
        0:       a = {1'($urandom), 8'hFF, 23'($urandom_range(0, 1))};
        1:       a = {1'($urandom), 31'd0};
        3:       a = {1'($urandom), 8'($urandom_range(1, 254)), 23'd0};
        default: a = {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)};
      endcase
      hist.push_back(ref_recip(a));
    end
    @(negedge clk);
    en   = 16'h0;
    held = q;
    for (int i = 0; i < 4; i++) begin
      a = rand_f(100, 150);
      @(negedge clk);
      checks++;
      if (q !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
