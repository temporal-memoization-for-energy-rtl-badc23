// resilient_fpu: execution stage of one FPU with error detection, baseline
// recovery and temporal memoization.
//
// Main idea: data-parallel kernels feed each FPU with few distinct operand
// sets, so a small table of recent error-free executions (tm_lut) can supply
// the result of most instructions. The LUT is searched in the issue cycle,
// in parallel with the first FPU stage. The per-instruction state that
// travels with it down the STAGES-deep pipeline (valid, tag, hit, the LUT
// result Q_L, the accumulated timing-error flag) decides at the end what
// happens, following four cases:
//   hit=0 error=0  normal execution, result Q_S, LUT updated (W_en)
//   hit=0 error=1  error_pipe to the ECU: flush and replay (tm_ecu)
//   hit=1 error=0  result Q_L, FPU stages 2..STAGES clock-gated
//   hit=1 error=1  result Q_L, stages gated, the error is masked
// A hit squashes the remaining stages: the enable of each later stage
// register is dropped cycle by cycle as the hit travels down the pipeline.
//
// Timing errors come from the error-detection sequentials (EDS) at the end of
// each stage, which are circuit-level sensors and enter here as stage_err:
// stage_err[k] is the sensor of the register that ends stage k+1, sampled in
// the cycle that register captures the instruction. The flags are ORed down
// the pipeline into one error bit per instruction.
//
// Interface: in_valid/in_ready handshake for issue (in_ready is low while the
// ECU replays), one result per cycle on out_valid/out_q/out_tag, in issue
// order. Latency STAGES cycles (16 for RECIP, 4 for the other units); an
// error on a miss adds the replay time.
// The pipeline, LUT coupling, hit/clock-gating chain, Q_Pipe mux and error
// masking follow the design; tags, the ready handshake and the status
// outputs are this implementation's additions.
module resilient_fpu
  import tm_pkg::*;
#(
  parameter fpu_kind_e   KIND     = FPU_ADD,
  parameter int unsigned TAG_W    = 8,
  parameter int unsigned DEPTH    = LUT_DEPTH,
  parameter int unsigned REPLAY_N = FPU_STAGES,
  localparam int unsigned STAGES  = fpu_stages(KIND),
  localparam int unsigned N_OPND  = fpu_nopnd(KIND),
  localparam bit          COMMUT  = fpu_commutative(KIND)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration (memory-mapped registers)
  input  logic                        memo_en,
  input  logic                        comm_en,
  input  logic [FP_W-1:0]             mask,
  input  logic                        pl_en,
  input  logic [N_OPND-1:0][FP_W-1:0] pl_ops,
  input  logic [FP_W-1:0]             pl_q,
  // issue from the read stage
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [N_OPND-1:0][FP_W-1:0] in_ops,
  input  logic [TAG_W-1:0]            in_tag,
  // EDS sensor outputs, one per stage
  input  logic [STAGES-1:0]           stage_err,
  // write stage
  output logic                        out_valid,
  output logic [FP_W-1:0]             out_q,
  output logic [TAG_W-1:0]            out_tag,
  output logic                        out_hit,
  // status
  output logic                        error_pipe,    // recovery triggered
  output logic                        masked_error,  // error hidden by a hit
  output logic                        lut_write,     // W_en
  output logic [STAGES-2:0]           stage_gated    // stage k+2 clock-gated
);

  typedef struct packed {
    logic                        valid;
    logic [TAG_W-1:0]            tag;
    logic [N_OPND-1:0][FP_W-1:0] ops;
    logic                        hit;
    logic [FP_W-1:0]             ql;
    logic                        err;
    logic                        shadow;
    logic                        safe;
  } meta_t;

  meta_t meta [STAGES];   // meta[k] travels with the register ending stage k+1

  // ---------------- issue: read stage or ECU replay ----------------
  logic                        ecu_busy, rp_valid, rp_shadow, rp_safe;
  logic [N_OPND-1:0][FP_W-1:0] rp_ops;
  logic [TAG_W-1:0]            rp_tag;

  logic                        iss_valid;
  logic [N_OPND-1:0][FP_W-1:0] iss_ops;
  logic [TAG_W-1:0]            iss_tag;
  logic                        iss_shadow, iss_safe;

  assign in_ready   = !ecu_busy;
  assign iss_valid  = ecu_busy ? rp_valid  : in_valid;
  assign iss_ops    = ecu_busy ? rp_ops    : in_ops;
  assign iss_tag    = ecu_busy ? rp_tag    : in_tag;
  assign iss_shadow = ecu_busy & rp_shadow;
  assign iss_safe   = ecu_busy & rp_safe;

  // ---------------- LUT ----------------
  logic            lut_hit;
  logic [FP_W-1:0] lut_q;
  logic [FP_W-1:0] q_s;
  logic            w_en;

  tm_lut #(
    .N_OPND(N_OPND), .DEPTH(DEPTH), .STAGES(STAGES), .COMMUTATIVE(COMMUT)
  ) u_lut (
    .clk, .rst_n,
    .enable   (memo_en),
    .mask, .comm_en,
    .lk_valid (iss_valid),
    .lk_ops   (iss_ops),
    .hit      (lut_hit),
    .q_l      (lut_q),
    .w_en     (w_en),
    .q_s      (q_s),
    .pl_en, .pl_ops, .pl_q
  );

  // ---------------- FPU pipeline with per-stage enables ----------------
  logic [STAGES-1:0] en;

  always_comb begin
    en[0] = iss_valid;
    for (int k = 1; k < STAGES; k++) en[k] = meta[k-1].valid & ~meta[k-1].hit;
    for (int k = 1; k < STAGES; k++) stage_gated[k-1] = meta[k-1].valid & meta[k-1].hit;
  end

  if (KIND == FPU_ADD) begin : g_add
    fp_add_pipe u_core (.clk, .rst_n, .en, .a(iss_ops[0]), .b(iss_ops[1]), .q(q_s));
  end else if (KIND == FPU_MUL) begin : g_mul
    fp_mul_pipe u_core (.clk, .rst_n, .en, .a(iss_ops[0]), .b(iss_ops[1]), .q(q_s));
  end else if (KIND == FPU_MULADD) begin : g_muladd
    fp_muladd_pipe u_core (.clk, .rst_n, .en, .a(iss_ops[0]), .b(iss_ops[1]),
                           .c(iss_ops[N_OPND-1]), .q(q_s));
  end else if (KIND == FPU_SQRT) begin : g_sqrt
    fp_sqrt_pipe u_core (.clk, .rst_n, .en, .a(iss_ops[0]), .q(q_s));
  end else if (KIND == FPU_RECIP) begin : g_recip
    fp_recip_pipe u_core (.clk, .rst_n, .en, .a(iss_ops[0]), .q(q_s));
  end else begin : g_fp2fix
    fp2fix_pipe u_core (.clk, .rst_n, .en, .a(iss_ops[0]), .q(q_s));
  end

  // ---------------- end of pipeline: Table of four cases ----------------
  meta_t last;
  logic  err_eff;

  always_comb begin
    last         = meta[STAGES-1];
    err_eff      = last.err & ~last.safe & ~last.shadow;
    error_pipe   = last.valid & err_eff & ~last.hit;
    masked_error = last.valid & err_eff & last.hit;
    w_en         = last.valid & ~last.hit & ~last.shadow & (~last.err | last.safe);
    lut_write    = w_en & memo_en;
    out_valid    = last.valid & ~last.shadow & ~error_pipe;
    out_q        = last.hit ? last.ql : q_s;      // Q_Pipe mux
    out_tag      = last.tag;
    out_hit      = last.hit;
  end

  // ---------------- metadata pipeline, flushed on recovery ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < STAGES; k++) meta[k] <= '0;
    end else begin
      meta[0].valid  <= iss_valid & ~error_pipe;
      meta[0].tag    <= iss_tag;
      meta[0].ops    <= iss_ops;
      meta[0].hit    <= lut_hit;
      meta[0].ql     <= lut_q;
      meta[0].err    <= iss_valid & stage_err[0];
      meta[0].shadow <= iss_shadow;
      meta[0].safe   <= iss_safe;
      for (int k = 1; k < STAGES; k++) begin
        meta[k]       <= meta[k-1];
        meta[k].valid <= meta[k-1].valid & ~error_pipe;
        meta[k].err   <= meta[k-1].err | (en[k] & stage_err[k]);
      end
    end
  end

  // ---------------- error control unit ----------------
  logic [STAGES:0]                       slot_valid;
  logic [STAGES:0][N_OPND-1:0][FP_W-1:0] slot_ops;
  logic [STAGES:0][TAG_W-1:0]            slot_tag;

  always_comb begin
    for (int s = 0; s < STAGES; s++) begin
      slot_valid[s] = meta[STAGES-1-s].valid & ~meta[STAGES-1-s].shadow;
      slot_ops[s]   = meta[STAGES-1-s].ops;
      slot_tag[s]   = meta[STAGES-1-s].tag;
    end
    slot_valid[STAGES] = iss_valid & ~iss_shadow;
    slot_ops[STAGES]   = iss_ops;
    slot_tag[STAGES]   = iss_tag;
  end

  tm_ecu #(
    .N_OPND(N_OPND), .TAG_W(TAG_W), .SLOTS(STAGES + 1), .REPLAY_N(REPLAY_N)
  ) u_ecu (
    .clk, .rst_n,
    .err_valid  (error_pipe),
    .slot_valid (slot_valid),
    .slot_ops   (slot_ops),
    .slot_tag   (slot_tag),
    .busy       (ecu_busy),
    .rp_valid   (rp_valid),
    .rp_ops     (rp_ops),
    .rp_tag     (rp_tag),
    .rp_shadow  (rp_shadow),
    .rp_safe    (rp_safe)
  );

  // The LUT is never written and searched-hit by the same squashed instruction.
  a_no_write_on_hit: assert property (@(posedge clk) disable iff (!rst_n)
    (last.valid && last.hit) |-> !w_en);

endmodule
