// tm_lut_tb: self-checking test of the memoization LUT.
// Operands are drawn from a small pool (plus variants that differ only in
// the 12 low bits), so hits and misses both occur. A behavioural model of the
// table (newest-first list of at most four entries, updated with the
// operands issued four cycles before each write) predicts hit and Q_L every
// cycle; the test covers exact and approximate masks, commutative lookups,
// FIFO replacement, preload, preload/update collision and disabling.
module tm_lut_tb;
  import tm_pkg::*;

  typedef struct {
    logic [1:0][31:0] ops;
    logic [31:0]      q;
  } ent_t;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             enable = 1'b1, comm_en = 1'b1, lk_valid = 1'b0, w_en = 1'b0, pl_en = 1'b0;
  logic [31:0]      mask = MASK_EXACT, q_s = '0, pl_q = '0, q_l;
  logic [1:0][31:0] lk_ops = '0, pl_ops = '0;
  logic             hit;
  int               checks = 0, failures = 0, hits = 0, misses = 0, evictions = 0;

  ent_t             model[$];
  logic [1:0][31:0] hist[$];
  logic [31:0]      pool[6];

  tm_lut #(.N_OPND(2), .DEPTH(4), .STAGES(4), .COMMUTATIVE(1'b1)) dut (
    .clk, .rst_n, .enable, .mask, .comm_en, .lk_valid, .lk_ops, .hit, .q_l,
    .w_en, .q_s, .pl_en, .pl_ops, .pl_q);

  always #5 clk = ~clk;

  function automatic bit eqm(input logic [31:0] x, input logic [31:0] y);
    return ((x ^ y) & ~mask) == '0;
  endfunction

  function automatic bit ent_match(input ent_t e, input logic [1:0][31:0] o);
    return (eqm(o[0], e.ops[0]) && eqm(o[1], e.ops[1])) ||
           (comm_en && eqm(o[0], e.ops[1]) && eqm(o[1], e.ops[0]));
  endfunction

  function automatic logic [31:0] pick();
    logic [31:0] v;
    v = pool[$urandom_range(0, 5)];
    if ($urandom_range(0, 3) == 0) v ^= ($urandom & 32'hFFF);
    return v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) pool[i] = $urandom;
    for (int i = 0; i < 4; i++) hist.push_back('0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit          exp_hit;
      logic [31:0] exp_q;
      ent_t        ne;
      @(negedge clk);
      // stimulus
      if (cyc % 1500 == 0) mask = (cyc / 1500) % 2 ? MASK_APPROX : MASK_EXACT;
      comm_en  = (cyc % 700) < 600;
      enable   = !((cyc % 2000) >= 1990);
      lk_valid = ($urandom_range(0, 7) != 0);
      lk_ops   = {pick(), pick()};
      w_en     = ($urandom_range(0, 2) == 0);
      q_s      = $urandom;
      pl_en    = ($urandom_range(0, 40) == 0);
      pl_ops   = {pick(), pick()};
      pl_q     = $urandom;
      #1;
      // model lookup
      exp_hit = 1'b0;
      exp_q   = '0;
      foreach (model[i]) if (!exp_hit && ent_match(model[i], lk_ops)) begin
        exp_hit = 1'b1;
        exp_q   = model[i].q;
      end
      exp_hit &= lk_valid & enable;
      checks++;
      if (hit !== exp_hit || (exp_hit && q_l !== exp_q)) begin
        failures++;
        if (failures < 10) $display("cyc %0d: hit %b/%b q %h/%h", cyc, hit, exp_hit, q_l, exp_q);
      end
      if (exp_hit) hits++; else if (lk_valid && enable) misses++;
      // model update at the coming edge
      if (!enable) model.delete();
      else if (pl_en || w_en) begin
        ne.ops = pl_en ? pl_ops : hist[0];
        ne.q   = pl_en ? pl_q : q_s;
        model.push_front(ne);
        if (model.size() > 4) begin
          void'(model.pop_back());
          evictions++;
        end
      end
      void'(hist.pop_front());
      hist.push_back(lk_ops);
    end
    checks += 3;
    if (hits < 100) failures++;
    if (misses < 100) failures++;
    if (evictions < 100) failures++;
    $display("hits=%0d misses=%0d evictions=%0d", hits, misses, evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
