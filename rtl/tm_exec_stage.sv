// tm_exec_stage: execute stage of one compute unit with timing-error-resilient,
// memoized floating-point units.
//
// A compute unit has LANES stream cores that execute the same instruction
// stream on different work-items. In this execute stage every lane owns one
// resilient_fpu of each kind (ADD, MUL, FP2FIX, MULADD, SQRT, RECIP), and
// every one of
// those FPUs carries its own private memoization LUT and error control unit,
// so each FPU recovers from timing errors on its own, without stalling the
// other lanes. Software programs the memoization modules through one
// tm_csr register block per FPU kind; its settings (enable, matching mask,
// commutativity, preloaded entries) are shared by that kind's FPUs in all
// lanes.
//
// Interface:
//   csr_we/csr_addr/csr_wdata/csr_rdata  register bus; csr_addr[5:3] selects
//       the FPU kind (tm_pkg::fpu_kind_e), csr_addr[2:0] the register
//   in_* / out_*  per lane and per FPU kind: issue handshake and results, in
//       issue order, 4 cycles after issue (16 for RECIP) when no recovery
//       is needed
//   stage_err     per lane, FPU and stage: outputs of the error-detection
//       sequentials, which are circuit sensors outside this RTL. Every unit
//       gets MAX_STAGES bits; a four-stage unit uses bits [3:0] only
//   error_pipe, masked_error, lut_write, stage_gated: per-FPU event outputs
//       for energy and hit-rate accounting: recovery started, error hidden
//       by a LUT hit, LUT updated, and stage_gated[k] while stage k+2 is
//       clock-gated by a hit. stage_gated bits above a unit's depth (bits
//       [14:3] of the four-stage units) are constant 0
// Operands are packed three per instruction; ADD and MUL use ops[0..1],
// FP2FIX, SQRT and RECIP use ops[0], MULADD computes ops[0]*ops[1]+ops[2].
//
// The per-FPU LUT, its placement in every lane, the six unit types and their
// depths follow the design. Lane decoupling queues and the rest of the GPU
// (fetch, scheduler, register files, memories) are outside this block.
module tm_exec_stage
  import tm_pkg::*;
#(
  parameter int unsigned LANES    = 16,
  parameter int unsigned TAG_W    = 8,
  parameter int unsigned DEPTH    = LUT_DEPTH,
  parameter int unsigned REPLAY_N = FPU_STAGES,
  localparam int unsigned NFPU    = NUM_FPU_KINDS
) (
  input  logic                                             clk,
  input  logic                                             rst_n,
  // register bus
  input  logic                                             csr_we,
  input  logic [5:0]                                       csr_addr,
  input  logic [FP_W-1:0]                                  csr_wdata,
  output logic [FP_W-1:0]                                  csr_rdata,
  // issue
  input  logic [LANES-1:0][NFPU-1:0]                       in_valid,
  output logic [LANES-1:0][NFPU-1:0]                       in_ready,
  input  logic [LANES-1:0][NFPU-1:0][MAX_OPND-1:0][FP_W-1:0] in_ops,
  input  logic [LANES-1:0][NFPU-1:0][TAG_W-1:0]            in_tag,
  // error-detection sequentials
  input  logic [LANES-1:0][NFPU-1:0][MAX_STAGES-1:0]       stage_err,
  // write-back
  output logic [LANES-1:0][NFPU-1:0]                       out_valid,
  output logic [LANES-1:0][NFPU-1:0][FP_W-1:0]             out_q,
  output logic [LANES-1:0][NFPU-1:0][TAG_W-1:0]            out_tag,
  output logic [LANES-1:0][NFPU-1:0]                       out_hit,
  // events
  output logic [LANES-1:0][NFPU-1:0]                       error_pipe,
  output logic [LANES-1:0][NFPU-1:0]                       masked_error,
  output logic [LANES-1:0][NFPU-1:0]                       lut_write,
  output logic [LANES-1:0][NFPU-1:0][MAX_STAGES-2:0]       stage_gated
);

  // ---------------- one register block per FPU kind ----------------
  logic [NFPU-1:0]                          memo_en, comm_en, pl_en;
  logic [NFPU-1:0][FP_W-1:0]                mask, pl_q, rdata;
  logic [NFPU-1:0][MAX_OPND-1:0][FP_W-1:0]  pl_ops;

  for (genvar f = 0; f < NFPU; f++) begin : g_csr
    tm_csr u_csr (
      .clk, .rst_n,
      .we     (csr_we && (csr_addr[5:3] == 3'(f))),
      .addr   (csr_addr[2:0]),
      .wdata  (csr_wdata),
      .rdata  (rdata[f]),
      .memo_en(memo_en[f]),
      .comm_en(comm_en[f]),
      .mask   (mask[f]),
      .pl_en  (pl_en[f]),
      .pl_ops (pl_ops[f]),
      .pl_q   (pl_q[f])
    );
  end

  assign csr_rdata = (csr_addr[5:3] < 3'(NFPU)) ? rdata[csr_addr[5:3]] : '0;

  // ---------------- lanes ----------------
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    for (genvar f = 0; f < NFPU; f++) begin : g_fpu
      localparam fpu_kind_e   K = fpu_kind_e'(f);
      localparam int unsigned N = fpu_nopnd(K);
      localparam int unsigned S = fpu_stages(K);

      resilient_fpu #(
        .KIND(K), .TAG_W(TAG_W), .DEPTH(DEPTH), .REPLAY_N(REPLAY_N)
      ) u_fpu (
        .clk, .rst_n,
        .memo_en      (memo_en[f]),
        .comm_en      (comm_en[f]),
        .mask         (mask[f]),
        .pl_en        (pl_en[f]),
        .pl_ops       (pl_ops[f][N-1:0]),
        .pl_q         (pl_q[f]),
        .in_valid     (in_valid[l][f]),
        .in_ready     (in_ready[l][f]),
        .in_ops       (in_ops[l][f][N-1:0]),
        .in_tag       (in_tag[l][f]),
        .stage_err    (stage_err[l][f][S-1:0]),
        .out_valid    (out_valid[l][f]),
        .out_q        (out_q[l][f]),
        .out_tag      (out_tag[l][f]),
        .out_hit      (out_hit[l][f]),
        .error_pipe   (error_pipe[l][f]),
        .masked_error (masked_error[l][f]),
        .lut_write    (lut_write[l][f]),
        .stage_gated  (stage_gated[l][f][S-2:0])
      );
      if (S < MAX_STAGES) begin : g_idle
        assign stage_gated[l][f][MAX_STAGES-2:S-1] = '0;
      end
    end
  end

endmodule
