// fp_muladd_pipe_tb: self-checking test of the four-stage multiply-add.
// Streams one random operand triple per cycle; c is chosen near the product
// (ordinary sums, cancellation) or special. Every result is checked against
// the reference (product rounded to single, then added) exactly four cycles
// after issue. Then checks that the stage enables freeze the pipeline.
module fp_muladd_pipe_tb;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  en = 4'hF;
  logic [31:0] a = '0, b = '0, c = '0, q;
  int          checks = 0, failures = 0;
  logic [31:0] hist[$];

  fp_muladd_pipe dut (.clk, .rst_n, .en, .a, .b, .c, .q);

  always #5 clk = ~clk;

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
      if (hist.size() == 4) begin
        checks++;
        if (q !== hist[0]) begin
          failures++;
          if (failures < 10) $display("muladd mismatch: got %h expected %h", q, hist[0]);
        end
        void'(hist.pop_front());
      end
      a = rand_f(100, 154);
      b = rand_f(100, 154);
      c = pick_b(ref_mul(a, b));
      hist.push_back(ref_muladd(a, b, c));
    end
    @(negedge clk);
    en   = 4'h0;
    held = q;
    for (int i = 0; i < 4; i++) begin
      a = rand_f(100, 150);
      b = rand_f(100, 150);
      @(negedge clk);
      checks++;
      if (q !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
