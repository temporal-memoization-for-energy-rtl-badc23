// tm_ecu: error control unit of one FPU pipeline.
//
// When a timing error reaches the end of the pipeline on an instruction that
// missed in the memoization LUT (err_valid), the ECU recovers by flushing and
// replaying. In that cycle it takes a snapshot of every instruction that is
// flushed: the errant one (slot 0), the younger ones still in the pipeline
// and the one being issued (slots 1..SLOTS-1, oldest first, slot_valid marks
// the occupied ones). From the next cycle it is busy: it holds the upstream
// read stage (busy, the replay request) and re-issues each snapshot
// instruction REPLAY_N times back to back (multiple-issue replay). The first
// REPLAY_N-1 copies only let the pipeline logic settle with the same inputs;
// they are marked shadow and produce no result. The last copy is marked safe:
// its result is trusted and its error sensor outputs are ignored.
//
// Timing: with K valid snapshot entries the ECU is busy for K*REPLAY_N cycles.
// The errant instruction's result then leaves the pipeline REPLAY_N+STAGES
// cycles later than it would have without the error.
//
// Flushing and multiple-issue replay follow the design's baseline recovery;
// replaying the whole flushed window in multiple-issue mode, the snapshot
// interface and REPLAY_N = pipeline depth are this implementation's choices.
module tm_ecu
  import tm_pkg::*;
#(
  parameter int unsigned N_OPND   = 2,
  parameter int unsigned TAG_W    = 8,
  parameter int unsigned SLOTS    = FPU_STAGES + 1,
  parameter int unsigned REPLAY_N = FPU_STAGES
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   err_valid,
  input  logic [SLOTS-1:0]                       slot_valid,
  input  logic [SLOTS-1:0][N_OPND-1:0][FP_W-1:0] slot_ops,
  input  logic [SLOTS-1:0][TAG_W-1:0]            slot_tag,
  output logic                                   busy,
  output logic                                   rp_valid,
  output logic [N_OPND-1:0][FP_W-1:0]            rp_ops,
  output logic [TAG_W-1:0]                       rp_tag,
  output logic                                   rp_shadow,
  output logic                                   rp_safe
);

  localparam int unsigned CW = $clog2(SLOTS + 1);
  localparam int unsigned RW = (REPLAY_N > 1) ? $clog2(REPLAY_N) : 1;

  logic [SLOTS-1:0][N_OPND-1:0][FP_W-1:0] q_ops;
  logic [SLOTS-1:0][TAG_W-1:0]            q_tag;
  logic [CW-1:0]                          count;  // entries still to replay
  logic [CW-1:0]                          head;
  logic [RW-1:0]                          copy;

  assign busy      = (count != '0);
  assign rp_valid  = busy;
  assign rp_ops    = q_ops[head];
  assign rp_tag    = q_tag[head];
  assign rp_safe   = busy && (copy == RW'(REPLAY_N - 1));
  assign rp_shadow = busy && !rp_safe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_ops <= '0;
      q_tag <= '0;
      count <= '0;
      head  <= '0;
      copy  <= '0;
    end else if (busy) begin
      if (copy == RW'(REPLAY_N - 1)) begin
        copy  <= '0;
        head  <= head + 1'b1;
        count <= count - 1'b1;
      end else begin
        copy <= copy + 1'b1;
      end
    end else if (err_valid) begin
      // compact the occupied slots, keeping their order
      automatic int n = 0;
      for (int s = 0; s < SLOTS; s++) begin
        if (slot_valid[s]) begin
          q_ops[n] <= slot_ops[s];
          q_tag[n] <= slot_tag[s];
          n++;
        end
      end
      count <= CW'(n);
      head  <= '0;
      copy  <= '0;
    end
  end

  // Replayed copies are either shadow or safe, so no error can be reported
  // while the ECU is replaying.
  a_no_error_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !err_valid);
  // The errant instruction itself is always part of the snapshot.
  a_errant_in_slot0: assert property (@(posedge clk) disable iff (!rst_n)
    err_valid |-> slot_valid[0]);

endmodule
