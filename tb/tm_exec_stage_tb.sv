// tm_exec_stage_tb: end-to-end test of the execute stage at its default size
// (16 lanes, each with ADD, MUL, FP2FIX, MULADD, SQRT and RECIP units).
// Every lane issues random instructions to all six units from small
// per-unit operand pools, with random timing errors at the stage sensors,
// while software reprograms the memoization modules over the register bus:
// exact matching, approximate matching on MUL, ADD memoization disabled,
// and a preloaded FP2FIX entry. Each unit's results are checked in issue
// order against reference arithmetic (an approximate hit may return the
// result of an earlier matching operand set). The test counts every
// mechanism (hit, commutative hit, approximate hit, miss with LUT update,
// recovery with its issue stall, error masked by a hit, stage clock gating,
// preload hit, disabled module) and fails if one never happens.
module tm_exec_stage_tb;
  import tm_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int L = 16, F = 6, RN = 4;

  typedef struct {
    logic [7:0]       tag;
    logic [2:0][31:0] ops;
    int               cyc;
  } inst_t;

  logic                          clk = 1'b0, rst_n = 1'b0;
  logic                          csr_we = 1'b0;
  logic [5:0]                    csr_addr = '0;
  logic [31:0]                   csr_wdata = '0, csr_rdata;
  logic [L-1:0][F-1:0]           in_valid = '0, in_ready;
  logic [L-1:0][F-1:0][2:0][31:0] in_ops = '0;
  logic [L-1:0][F-1:0][7:0]      in_tag = '0;
  logic [L-1:0][F-1:0][15:0]     stage_err = '0;
  logic [L-1:0][F-1:0]           out_valid, out_hit, error_pipe, masked_error, lut_write;
  logic [L-1:0][F-1:0][31:0]     out_q;
  logic [L-1:0][F-1:0][7:0]      out_tag;
  logic [L-1:0][F-1:0][14:0]     stage_gated;

  tm_exec_stage dut (
    .clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata,
    .in_valid, .in_ready, .in_ops, .in_tag, .stage_err,
    .out_valid, .out_q, .out_tag, .out_hit,
    .error_pipe, .masked_error, .lut_write, .stage_gated);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, err_pct = 3, issue_pct = 80;
  int n_hit = 0, n_miss = 0, n_recov = 0, n_stall = 0, n_masked = 0, n_gated = 0;
  int n_write = 0, n_approx = 0, n_comm = 0, n_preload = 0, n_disabled = 0, n_results = 0;
  bit add_disabled = 1'b0, preload_phase = 1'b0;
  logic [31:0] marker = 32'hCAFE_F00D, pl_x;

  inst_t            pend[L][F][$];
  logic [2:0][31:0] seen[L][F][$];
  logic [7:0]       next_tag[L][F];
  logic [31:0]      pool[F][6];
  int               recov_cyc[L][F];
  logic [31:0]      exp_ctrl[F], exp_mask[F];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("cycle %0d FAIL: %s", cyc, what);
    end
  endtask

  function automatic logic [31:0] reference(input int f, input logic [2:0][31:0] o);
    case (f)
      int'(FPU_ADD):    return ref_add(o[0], o[1]);
      int'(FPU_MUL):    return ref_mul(o[0], o[1]);
      int'(FPU_FP2FIX): return ref_fp2fix(o[0]);
      int'(FPU_SQRT):   return r2f($sqrt(f2r(o[0])));
      int'(FPU_RECIP):  return r2f(1.0 / f2r(o[0]));
      default:          return ref_muladd(o[0], o[1], o[2]);
    endcase
  endfunction

  // operands a unit uses: the rest of the packed set is don't-care
  function automatic logic [2:0][31:0] used(input int f, input logic [2:0][31:0] o);
    logic [2:0][31:0] u;
    u = o;
    if (f == int'(FPU_FP2FIX) || f == int'(FPU_SQRT) || f == int'(FPU_RECIP)) begin
      u[1] = '0;
      u[2] = '0;
    end
    else if (f != int'(FPU_MULADD)) u[2] = '0;
    return u;
  endfunction

  task automatic csr_write(input int f, input csr_addr_e r, input logic [31:0] v);
    @(posedge clk); #2;
    csr_we = 1'b1; csr_addr = {3'(f), r}; csr_wdata = v;
    @(posedge clk); #2;
    csr_we = 1'b0;
    if (r == CSR_CTRL) exp_ctrl[f] = {30'd0, v[1:0]};
    if (r == CSR_MASK) exp_mask[f] = v;
    // the write reached its own unit's registers and no other
    for (int g = 0; g < F; g++) begin
      csr_addr = {3'(g), CSR_CTRL};
      #1 check(csr_rdata == exp_ctrl[g], $sformatf("unit %0d control register", g));
      csr_addr = {3'(g), CSR_MASK};
      #1 check(csr_rdata == exp_mask[g], $sformatf("unit %0d mask register", g));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor and scoreboards
  always @(negedge clk) if (rst_n) begin
    cyc++;
    for (int l = 0; l < L; l++) for (int f = 0; f < F; f++) begin
      if (error_pipe[l][f]) begin
        n_recov++;
        recov_cyc[l][f] = cyc;
        check(!out_hit[l][f], "recovery only on a miss");
      end
      if (in_valid[l][f] && !in_ready[l][f]) n_stall++;
      if (masked_error[l][f]) n_masked++;
      if (lut_write[l][f]) n_write++;
      if (stage_gated[l][f] != '0) n_gated++;
      if (out_valid[l][f]) begin
        inst_t       e;
        logic [31:0] r;
        bit          same_seen, swap_seen, ok;
        check(pend[l][f].size() > 0, "result without instruction");
        if (pend[l][f].size() > 0) begin
          e = pend[l][f].pop_front();
          r = reference(f, e.ops);
          n_results++;
          check(out_tag[l][f] == e.tag, "results in issue order");
          ok = (out_q[l][f] == r);
          if (out_hit[l][f]) begin
            n_hit++;
            if (f == int'(FPU_ADD) && add_disabled) n_disabled = -1000000;
            if (preload_phase && f == int'(FPU_FP2FIX) && out_q[l][f] == marker) begin
              n_preload++;
              ok = 1'b1;
            end
            if (!ok && f == int'(FPU_MUL)) begin
              foreach (seen[l][f][i]) if (reference(f, seen[l][f][i]) == out_q[l][f]) ok = 1'b1;
              if (ok) n_approx++;
            end
            same_seen = 1'b0; swap_seen = 1'b0;
            foreach (seen[l][f][i]) begin
              if (seen[l][f][i] == e.ops) same_seen = 1'b1;
              if (seen[l][f][i][0] == e.ops[1] && seen[l][f][i][1] == e.ops[0] &&
                  seen[l][f][i][2] == e.ops[2]) swap_seen = 1'b1;
            end
            if (swap_seen && !same_seen && fpu_commutative(fpu_kind_e'(f))) n_comm++;
          end else begin
            n_miss++;
          end
          check(ok, $sformatf("lane %0d unit %0d: got %h expected %h", l, f, out_q[l][f], r));
          if (cyc - e.cyc != int'(fpu_stages(fpu_kind_e'(f))))
            check(recov_cyc[l][f] >= e.cyc && recov_cyc[l][f] <= e.cyc + int'(fpu_stages(fpu_kind_e'(f))),
                  $sformatf("unit %0d latency %0d without recovery", f, cyc - e.cyc));
          seen[l][f].push_back(e.ops);
          if (seen[l][f].size() > 24) void'(seen[l][f].pop_front());
        end
      end
      if (in_valid[l][f] && in_ready[l][f]) begin
        pend[l][f].push_back('{tag: in_tag[l][f], ops: used(f, in_ops[l][f]), cyc: cyc});
        next_tag[l][f]++;
      end
    end
    if (add_disabled && n_disabled >= 0) n_disabled++;
  end

  task automatic drive(input int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #2;
      for (int l = 0; l < L; l++) for (int f = 0; f < F; f++) begin
        in_valid[l][f] = ($urandom_range(0, 99) < issue_pct);
        in_tag[l][f]   = next_tag[l][f];
        for (int k = 0; k < 3; k++) in_ops[l][f][k] = pool[f][$urandom_range(0, 5)];
        if (f == int'(FPU_MUL) && $urandom_range(0, 1) == 1) in_ops[l][f][0] ^= ($urandom & 32'hFFF);
        for (int s = 0; s < 16; s++)
          stage_err[l][f][s] = (s < int'(fpu_stages(fpu_kind_e'(f)))) && ($urandom_range(0, 199) < err_pct);
      end
    end
  endtask

  task automatic drain();
    @(posedge clk); #2;
    in_valid = '0;
    stage_err = '0;
    repeat (120) @(posedge clk);
  endtask

  initial begin
    for (int l = 0; l < L; l++) for (int f = 0; f < F; f++) begin
      next_tag[l][f]  = '0;
      recov_cyc[l][f] = -100;
    end
    for (int f = 0; f < F; f++) begin
      exp_ctrl[f] = 32'd3;
      exp_mask[f] = MASK_EXACT;
    end
    for (int f = 0; f < F; f++) for (int i = 0; i < 6; i++)
      pool[f][i] = (f == int'(FPU_FP2FIX)) ? rand_f(120, 150) :
                   (f == int'(FPU_SQRT))   ? (rand_f(100, 150) & 32'h7FFF_FFFF) : rand_f(120, 134);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // exact matching everywhere
    drive(1000);
    drain();
    // approximate matching on MUL
    csr_write(int'(FPU_MUL), CSR_MASK, MASK_APPROX);
    drive(800);
    drain();
    // ADD memoization power-gated
    csr_write(int'(FPU_ADD), CSR_CTRL, 32'd2);
    add_disabled = 1'b1;
    drive(300);
    drain();
    add_disabled = 1'b0;
    csr_write(int'(FPU_ADD), CSR_CTRL, 32'd3);
    // preload a marker result for an operand FP2FIX has not seen
    pl_x = rand_f(160, 160);
    csr_write(int'(FPU_FP2FIX), CSR_PL_OP0, pl_x);
    csr_write(int'(FPU_FP2FIX), CSR_PL_Q, marker);
    csr_write(int'(FPU_FP2FIX), CSR_PL_GO, 32'd1);
    preload_phase = 1'b1;
    @(posedge clk); #2;
    for (int l = 0; l < L; l++) begin
      in_valid[l][FPU_FP2FIX] = 1'b1;
      in_tag[l][FPU_FP2FIX]   = next_tag[l][FPU_FP2FIX];
      in_ops[l][FPU_FP2FIX]   = {32'd0, 32'd0, pl_x};
    end
    drain();
    for (int l = 0; l < L; l++) for (int f = 0; f < F; f++)
      check(pend[l][f].size() == 0, "every instruction completed");
    check(n_hit > 0, "LUT hits");
    check(n_miss > 0, "LUT misses");
    check(n_write > 0, "LUT updates");
    check(n_comm > 0, "commutative hits");
    check(n_approx > 0, "approximate hits");
    check(n_recov > 0, "recoveries");
    check(n_stall > 0, "issue stalls during replay");
    check(n_masked > 0, "errors masked by a hit");
    check(n_gated > 0, "clock-gated stages");
    check(n_preload == L, "preloaded entry served in every lane");
    check(n_disabled > 0, "disabled module never hits");
    $display("results=%0d hits=%0d misses=%0d writes=%0d comm=%0d approx=%0d recoveries=%0d stalls=%0d masked=%0d gated=%0d preload=%0d",
             n_results, n_hit, n_miss, n_write, n_comm, n_approx, n_recov, n_stall, n_masked, n_gated, n_preload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
