// resilient_fpu_tb: self-checking test of one memoized, error-resilient FPU
// (the ADD unit).
// Operands come from a small pool so the LUT hits often; random timing errors
// are injected at the stage sensors. Every result is checked, in issue order,
// against the reference sum; with approximate matching a hit may instead
// return the reference sum of an earlier operand set that matches under the
// mask. Also checked: latency 4 for every instruction not caught in a
// recovery, latency 4+REPLAY_N+4 for an errant miss, that a hit masks an
// error without recovery, that clock-gated stages keep their registers, that
// a disabled module never hits, and that a preloaded entry is served.
// Each of these mechanisms must occur at least once.
module resilient_fpu_tb;
  import tm_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int RN = 4;

  typedef struct {
    logic [7:0]       tag;
    logic [1:0][31:0] ops;
    int               cyc;
  } inst_t;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             memo_en = 1'b1, comm_en = 1'b1, pl_en = 1'b0;
  logic [31:0]      mask = MASK_EXACT, pl_q = '0;
  logic [1:0][31:0] pl_ops = '0, in_ops = '0;
  logic             in_valid = 1'b0, in_ready;
  logic [7:0]       in_tag = '0;
  logic [3:0]       stage_err = '0;
  logic             out_valid, out_hit, error_pipe, masked_error, lut_write;
  logic [31:0]      out_q;
  logic [7:0]       out_tag;
  logic [2:0]       stage_gated;

  int checks = 0, failures = 0, cyc = 0, err_pct = 3;
  int n_hit = 0, n_miss = 0, n_recov = 0, n_masked = 0, n_gated = 0, n_write = 0;
  int n_approx_hit = 0, n_preload_hit = 0, n_flushed = 0;
  bit preload_phase = 1'b0;
  logic [31:0] marker;

  inst_t            pend[$];
  logic [1:0][31:0] seen[$];
  logic [31:0]      pool[8];
  int               recov_cyc = -100;
  logic [7:0]       next_tag = '0;

  resilient_fpu #(.KIND(FPU_ADD), .TAG_W(8), .DEPTH(4), .REPLAY_N(RN)) dut (
    .clk, .rst_n, .memo_en, .comm_en, .mask, .pl_en, .pl_ops, .pl_q,
    .in_valid, .in_ready, .in_ops, .in_tag, .stage_err,
    .out_valid, .out_q, .out_tag, .out_hit, .error_pipe, .masked_error, .lut_write,
    .stage_gated);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("cycle %0d FAIL: %s", cyc, what);
    end
  endtask

  function automatic bit approx_ok(input logic [31:0] q);
    foreach (seen[i])
      if (ref_add(seen[i][0], seen[i][1]) == q) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit mmatch(input logic [1:0][31:0] x, input logic [1:0][31:0] y);
    return ((((x[0] ^ y[0]) | (x[1] ^ y[1])) & ~mask) == '0) ||
           ((((x[0] ^ y[1]) | (x[1] ^ y[0])) & ~mask) == '0);
  endfunction

  // squashed stages keep their registers
  logic [$bits(dut.g_add.u_core.s2_q)-1:0] s2_before;
  always @(posedge clk) begin
    if (rst_n && stage_gated[0]) begin
      s2_before = dut.g_add.u_core.s2_q;
      #1;
      check(dut.g_add.u_core.s2_q == s2_before, "gated stage 2 register changed");
      n_gated++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor and scoreboard, sampled between the edges
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (error_pipe) begin
      n_recov++;
      check(pend.size() > 0 && out_tag == pend[0].tag, "errant instruction is the oldest");
      check(!out_valid, "no result on recovery");
      check(!out_hit, "a LUT hit never starts a recovery");
      recov_cyc = cyc;
    end
    if (masked_error) begin
      n_masked++;
      check(out_valid && out_hit, "a masked error still delivers the LUT result");
    end
    if (lut_write) n_write++;
    if (out_valid) begin
      inst_t       e;
      logic [31:0] r;
      if (pend.size() == 0) begin
        check(1'b0, "result without instruction");
      end else begin
        e = pend.pop_front();
        r = ref_add(e.ops[0], e.ops[1]);
        check(out_tag == e.tag, $sformatf("tag order: got %0d expected %0d", out_tag, e.tag));
        if (out_hit) n_hit++; else n_miss++;
        if (preload_phase && out_hit && out_q == marker) n_preload_hit++;
        else if (out_hit && mask != MASK_EXACT && out_q != r) begin
          n_approx_hit++;
          check(approx_ok(out_q), "approximate hit returns a result of a matching set");
        end else
          check(out_q == r, $sformatf("result %h expected %h", out_q, r));
        if (cyc - e.cyc == 4) ;
        else if (cyc - e.cyc == 4 + RN + 4 && recov_cyc == e.cyc + 4) ;
        else if (recov_cyc >= e.cyc && recov_cyc <= e.cyc + 4) n_flushed++;
        else check(1'b0, $sformatf("latency %0d", cyc - e.cyc));
        if (!memo_en) check(!out_hit, "hit while disabled");
        seen.push_back(e.ops);
        if (seen.size() > 64) void'(seen.pop_front());
      end
    end
    if (in_valid && in_ready) begin
      pend.push_back('{tag: in_tag, ops: in_ops, cyc: cyc});
      next_tag++;
    end
  end

  task automatic drive(input int n, input int pool_n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #2;
      in_valid  = ($urandom_range(0, 5) != 0);
      in_tag    = next_tag;
      in_ops    = {pool[$urandom_range(0, pool_n - 1)], pool[$urandom_range(0, pool_n - 1)]};
      if (mask != MASK_EXACT && $urandom_range(0, 1) == 1) in_ops[0] ^= ($urandom & 32'hFFF);
      for (int s = 0; s < 4; s++) stage_err[s] = ($urandom_range(0, 99) < err_pct);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) pool[i] = rand_f(120, 135);
    marker = 32'h1234_5678;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // exact matching, commutative
    drive(3000, 6);
    // approximate matching
    mask = MASK_APPROX;
    drive(2000, 6);
    // memoization disabled (power-gated)
    mask = MASK_EXACT;
    memo_en = 1'b0;
    drive(800, 6);
    // preload a marker result for a fresh operand pair, then look it up
    in_valid = 1'b0;
    repeat (12) @(posedge clk);
    memo_en = 1'b1;
    preload_phase = 1'b1;
    pool[7] = rand_f(140, 141);
    @(posedge clk); #2;
    pl_ops = {pool[7], pool[7]};
    pl_q   = marker;
    pl_en  = 1'b1;
    @(posedge clk); #2;
    pl_en = 1'b0;
    err_pct = 0;
    in_valid = 1'b1;
    in_ops   = {pool[7], pool[7]};
    in_tag   = next_tag;
    @(posedge clk); #2;
    in_valid = 1'b0;
    repeat (30) @(posedge clk);
    check(pend.size() == 0, "all instructions completed");
    check(n_hit > 0, "hits occurred");
    check(n_miss > 0, "misses occurred");
    check(n_recov > 0, "recoveries occurred");
    check(n_masked > 0, "masked errors occurred");
    check(n_gated > 0, "clock gating occurred");
    check(n_write > 0, "LUT updates occurred");
    check(n_approx_hit > 0, "approximate hits occurred");
    check(n_preload_hit == 1, "preloaded entry served");
    check(n_flushed > 0, "flushed instructions replayed");
    $display("hits=%0d misses=%0d recoveries=%0d masked=%0d gated=%0d writes=%0d approx=%0d flushed=%0d",
             n_hit, n_miss, n_recov, n_masked, n_gated, n_write, n_approx_hit, n_flushed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
