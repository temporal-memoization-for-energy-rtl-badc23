// tm_lut: single-cycle memoization lookup table tightly coupled to one FPU.
//
// The LUT remembers the contexts of the most recent error-free executions of
// its FPU: each of the DEPTH FIFO entries holds an operand set and the result
// the FPU computed for it. It works in parallel with the first FPU stage: the
// operand set being issued is compared, in the same cycle, with every entry
// by DEPTH parallel comparators (tm_comparator) under the programmable
// masking vector. A match raises hit and selects that entry's stored result
// as q_l; if several entries match, the most recent one wins.
//
// Update: the issued operands travel through a STAGES-deep buffer so that
// they arrive at the end of the FPU pipeline together with the result Q_S.
// When w_en is high (a miss that finished all stages without a timing error)
// the buffered operands and q_s are inserted at the head of the FIFO and the
// oldest entry is dropped. A software preload (pl_en) inserts an entry the
// same way; if both happen in one cycle the preload wins and the hardware
// update is dropped, which only costs a possible later hit.
// Disabling the module (enable low, the power-gated state) forces hit low,
// blocks all updates and invalidates every entry.
//
// Entries, comparators, operand buffers and the Q_S/W_en update follow the
// design's LUT; the tie-break between matches, the preload port and
// invalidation on disable are this implementation's choices.
module tm_lut
  import tm_pkg::*;
#(
  parameter int unsigned N_OPND      = 2,
  parameter int unsigned DEPTH       = LUT_DEPTH,
  parameter int unsigned STAGES      = FPU_STAGES,
  parameter bit          COMMUTATIVE = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration
  input  logic                        enable,
  input  logic [FP_W-1:0]             mask,
  input  logic                        comm_en,
  // lookup, in the issue cycle
  input  logic                        lk_valid,
  input  logic [N_OPND-1:0][FP_W-1:0] lk_ops,
  output logic                        hit,
  output logic [FP_W-1:0]             q_l,
  // update, at the end of the FPU pipeline
  input  logic                        w_en,
  input  logic [FP_W-1:0]             q_s,
  // preload of pre-computed values
  input  logic                        pl_en,
  input  logic [N_OPND-1:0][FP_W-1:0] pl_ops,
  input  logic [FP_W-1:0]             pl_q
);

  typedef struct packed {
    logic                        valid;
    logic [N_OPND-1:0][FP_W-1:0] ops;
    logic [FP_W-1:0]             q;
  } entry_t;

  entry_t                               fifo [DEPTH];
  logic [STAGES-1:0][N_OPND-1:0][FP_W-1:0] opbuf;
  logic [DEPTH-1:0]                     match;

  // ---------------- comparators ----------------
  for (genvar e = 0; e < DEPTH; e++) begin : g_comp
    tm_comparator #(.N_OPND(N_OPND), .COMMUTATIVE(COMMUTATIVE)) u_comp (
      .in_ops      (lk_ops),
      .entry_ops   (fifo[e].ops),
      .entry_valid (fifo[e].valid),
      .mask        (mask),
      .comm_en     (comm_en),
      .match       (match[e])
    );
  end

  // ---------------- output mux, newest entry first ----------------
  always_comb begin
    hit = 1'b0;
    q_l = '0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      if (match[e]) begin
        hit = lk_valid & enable;
        q_l = fifo[e].q;
      end
    end
  end

  // ---------------- operand buffers and FIFO ----------------
  logic   push;
  entry_t new_entry;

  always_comb begin
    push = 1'b0;
    new_entry = '0;
    if (enable && pl_en) begin
      push = 1'b1;
      new_entry = '{valid: 1'b1, ops: pl_ops, q: pl_q};
    end else if (enable && w_en) begin
      push = 1'b1;
      new_entry = '{valid: 1'b1, ops: opbuf[STAGES-1], q: q_s};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opbuf <= '0;
      for (int e = 0; e < DEPTH; e++) fifo[e] <= '0;
    end else begin
      opbuf[0] <= lk_ops;
      for (int s = 1; s < STAGES; s++) opbuf[s] <= opbuf[s-1];
      if (!enable) begin
        for (int e = 0; e < DEPTH; e++) fifo[e].valid <= 1'b0;
      end else if (push) begin
        fifo[0] <= new_entry;
        for (int e = 1; e < DEPTH; e++) fifo[e] <= fifo[e-1];
      end
    end
  end

endmodule
