// tm_comparator: one "Comp" cloud of the memoization LUT.
//
// Compares an incoming operand set with the operand set stored in one LUT
// entry under the programmable matching constraint. Every operand bit whose
// masking-vector bit is 1 is ignored, so an all-zero mask is the exact
// matching constraint and a mask of the 12 low fraction bits is the
// approximate one. The same 32-bit mask applies to every operand. When
// commutativity is allowed (parameter COMMUTATIVE, for operations where
// operand order does not matter, and the run-time enable comm_en), a match
// with operands 0 and 1 swapped also counts. Purely combinational.
//
// The masking vector and commutativity follow the design; the mask polarity
// (1 = ignore) and sharing one mask across all operands are this
// implementation's choices.
module tm_comparator
  import tm_pkg::*;
#(
  parameter int unsigned N_OPND      = 2,
  parameter bit          COMMUTATIVE = 1'b1
) (
  input  logic [N_OPND-1:0][FP_W-1:0] in_ops,
  input  logic [N_OPND-1:0][FP_W-1:0] entry_ops,
  input  logic                        entry_valid,
  input  logic [FP_W-1:0]             mask,
  input  logic                        comm_en,
  output logic                        match
);

  logic direct, swapped;

  always_comb begin
    direct = 1'b1;
    for (int i = 0; i < N_OPND; i++)
      if (((in_ops[i] ^ entry_ops[i]) & ~mask) != '0) direct = 1'b0;

    swapped = 1'b0;
    if (COMMUTATIVE && N_OPND >= 2) begin
      swapped = 1'b1;
      for (int i = 0; i < N_OPND; i++) begin
        int j;
        j = (i == 0) ? 1 : (i == 1) ? 0 : i;
        if (((in_ops[i] ^ entry_ops[j]) & ~mask) != '0) swapped = 1'b0;
      end
    end

    match = entry_valid & (direct | (comm_en & swapped));
  end

endmodule
