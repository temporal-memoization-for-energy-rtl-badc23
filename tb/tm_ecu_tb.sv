// tm_ecu_tb: self-checking test of the error control unit.
// Presents random flush snapshots (any subset of the five slots, the errant
// slot 0 always occupied) and checks the replay that follows: busy for
// exactly K*REPLAY_N cycles, each snapshot entry issued REPLAY_N times in
// slot order with the right operands and tag, the first copies marked shadow
// and the last one safe.
module tm_ecu_tb;
  import tm_pkg::*;

  localparam int SLOTS = 5, RN = 4;

  logic                         clk = 1'b0, rst_n = 1'b0, err_valid = 1'b0;
  logic [SLOTS-1:0]             slot_valid = '0;
  logic [SLOTS-1:0][1:0][31:0]  slot_ops = '0;
  logic [SLOTS-1:0][7:0]        slot_tag = '0;
  logic                         busy, rp_valid, rp_shadow, rp_safe;
  logic [1:0][31:0]             rp_ops;
  logic [7:0]                   rp_tag;
  int                           checks = 0, failures = 0;

  tm_ecu #(.N_OPND(2), .TAG_W(8), .SLOTS(SLOTS), .REPLAY_N(RN)) dut (
    .clk, .rst_n, .err_valid, .slot_valid, .slot_ops, .slot_tag,
    .busy, .rp_valid, .rp_ops, .rp_tag, .rp_shadow, .rp_safe);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic [1:0][31:0] eops[$];
      logic [7:0]       etag[$];
      eops.delete();
      etag.delete();
      @(negedge clk);
      check(!busy, "idle before error");
      slot_valid = 5'($urandom) | 5'd1;
      for (int s = 0; s < SLOTS; s++) begin
        slot_ops[s] = {32'($urandom), 32'($urandom)};
        slot_tag[s] = 8'($urandom);
        if (slot_valid[s]) begin
          eops.push_back(slot_ops[s]);
          etag.push_back(slot_tag[s]);
        end
      end
      err_valid = 1'b1;
      @(negedge clk);
      err_valid  = 1'b0;
      slot_valid = '0;
      foreach (eops[i]) begin
        for (int c = 0; c < RN; c++) begin
          check(busy && rp_valid, "busy while replaying");
          check(rp_ops == eops[i] && rp_tag == etag[i], "replayed instruction");
          check(rp_safe == (c == RN - 1) && rp_shadow == (c != RN - 1), "shadow/safe copies");
          @(negedge clk);
        end
      end
      check(!busy && !rp_valid, "replay ends after K*REPLAY_N cycles");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
