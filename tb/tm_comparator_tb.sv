// tm_comparator_tb: self-checking test of the LUT comparator.
// Drives a two-operand and a three-operand comparator with random operand
// sets built to be equal, equal only in unmasked bits, different in unmasked
// bits, swapped, or stored in an invalid entry, under the exact and the
// approximate masking vector and with commutativity on and off. The expected
// match is computed bit by bit in the testbench.
module tm_comparator_tb;
  import tm_pkg::*;

  logic [1:0][31:0] in2, en2;
  logic [2:0][31:0] in3, en3;
  logic             valid, comm;
  logic [31:0]      mask;
  logic             m2, m3;
  int               checks = 0, failures = 0;
  int               kinds[6] = '{default: 0};

  tm_comparator #(.N_OPND(2), .COMMUTATIVE(1'b1)) u2 (
    .in_ops(in2), .entry_ops(en2), .entry_valid(valid), .mask, .comm_en(comm), .match(m2));
  tm_comparator #(.N_OPND(3), .COMMUTATIVE(1'b1)) u3 (
    .in_ops(in3), .entry_ops(en3), .entry_valid(valid), .mask, .comm_en(comm), .match(m3));

  function automatic bit eqm(input logic [31:0] x, input logic [31:0] y, input logic [31:0] m);
    for (int i = 0; i < 32; i++)
      if (!m[i] && x[i] != y[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #1;
    for (int t = 0; t < 4000; t++) begin
      int k;
      bit e2, e3;
      mask  = ($urandom_range(0, 1) == 1) ? MASK_APPROX : MASK_EXACT;
      comm  = 1'($urandom);
      valid = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < 3; i++) in3[i] = $urandom;
      in2 = in3[1:0];
      k = $urandom_range(0, 4);
      kinds[k]++;
      case (k)
        0: en3 = in3;                                             // equal
        1: for (int i = 0; i < 3; i++) en3[i] = in3[i] ^ ($urandom & 32'hFFF);  // masked bits only
        2: begin en3 = in3; en3[$urandom_range(0, 2)][12 + $urandom_range(0, 19)] ^= 1'b1; end
        3: en3 = {in3[2], in3[0], in3[1]};                        // operands 0 and 1 swapped
        default: for (int i = 0; i < 3; i++) en3[i] = $urandom;
      endcase
      en2 = en3[1:0];
      #1;
      e2 = valid && ((eqm(in2[0], en2[0], mask) && eqm(in2[1], en2[1], mask)) ||
                     (comm && eqm(in2[0], en2[1], mask) && eqm(in2[1], en2[0], mask)));
      e3 = valid && ((eqm(in3[0], en3[0], mask) && eqm(in3[1], en3[1], mask) && eqm(in3[2], en3[2], mask)) ||
                     (comm && eqm(in3[0], en3[1], mask) && eqm(in3[1], en3[0], mask) && eqm(in3[2], en3[2], mask)));
      checks += 2;
      if (m2 !== e2) begin failures++; if (failures < 10) $display("N=2 case %0d: got %b exp %b", k, m2, e2); end
      if (m3 !== e3) begin failures++; if (failures < 10) $display("N=3 case %0d: got %b exp %b", k, m3, e3); end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (kinds[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
