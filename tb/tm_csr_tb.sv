// tm_csr_tb: self-checking test of the memoization register block.
// Checks the reset values, random writes and read-back of every register
// against a shadow copy kept in the testbench, that unmapped addresses read
// zero, and that a write to PL_GO gives exactly one cycle of pl_en carrying
// the preload operands and result.
module tm_csr_tb;
  import tm_pkg::*;

  logic                 clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0]           addr = '0;
  logic [31:0]          wdata = '0, rdata, mask, pl_q;
  logic                 memo_en, comm_en, pl_en;
  logic [2:0][31:0]     pl_ops;
  logic [7:0][31:0]     shadow;
  int                   checks = 0, failures = 0, pushes = 0;

  tm_csr dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .memo_en, .comm_en, .mask,
              .pl_en, .pl_ops, .pl_q);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(memo_en == 1'b1 && comm_en == 1'b1 && mask == MASK_EXACT && !pl_en, "reset values");
    shadow = '0;
    shadow[CSR_CTRL] = 32'd3;
    for (int i = 0; i < 400; i++) begin
      int a;
      @(negedge clk);
      a     = $urandom_range(0, 7);
      addr  = 3'(a);
      wdata = $urandom;
      we    = 1'b1;
      @(negedge clk);
      we = 1'b0;
      if (a == int'(CSR_CTRL)) shadow[a] = {30'd0, wdata[1:0]};
      else if (a <= int'(CSR_PL_Q)) shadow[a] = wdata;
      if (a == int'(CSR_PL_GO)) begin
        check(pl_en == 1'b1, "pl_en after PL_GO");
        check(pl_ops[0] == shadow[CSR_PL_OP0] && pl_ops[1] == shadow[CSR_PL_OP1] &&
              pl_ops[2] == shadow[CSR_PL_OP2] && pl_q == shadow[CSR_PL_Q], "preload data");
        pushes++;
        @(negedge clk);
        check(pl_en == 1'b0, "pl_en is one cycle");
      end else begin
        check(pl_en == 1'b0, "no pl_en");
      end
      check(memo_en == shadow[CSR_CTRL][0] && comm_en == shadow[CSR_CTRL][1], "ctrl outputs");
      check(mask == shadow[CSR_MASK], "mask output");
      for (int r = 0; r < 8; r++) begin
        addr = 3'(r);
        #1;
        check(rdata == ((r <= int'(CSR_PL_Q)) ? shadow[r] : 32'd0), $sformatf("read %0d", r));
      end
    end
    check(pushes > 10, "preloads exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
