// fp2fix_pipe_tb: self-checking test of the four-stage float-to-int32 unit.
// Streams one random operand per cycle across the whole exponent range
// (fractions below one, exact integers, saturation, infinities, NaN) and
// checks each result against truncation of the real value exactly four
// cycles after issue. Then checks that the stage enables freeze the pipeline.
module fp2fix_pipe_tb;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  en = 4'hF;
  logic [31:0] a = '0, q;
  int          checks = 0, failures = 0;
  logic [31:0] hist[$];

  fp2fix_pipe dut (.clk, .rst_n, .en, .a, .q);

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
          if (failures < 10) $display("fp2fix mismatch: a=%h got %h expected %h", a, q, hist[0]);
        end
        void'(hist.pop_front());
      end
      case ($urandom_range(0, 9))
        0:       a = {1'($urandom), 8'hFF, 23'($urandom)};
        1:       a = rand_f(1, 254);
        default: a = rand_f(110, 162);
      endcase
      hist.push_back(ref_fp2fix(a));
    end
    @(negedge clk);
    en   = 4'h0;
    held = q;
    for (int i = 0; i < 4; i++) begin
      a = rand_f(128, 150);
      @(negedge clk);
      checks++;
      if (q !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
