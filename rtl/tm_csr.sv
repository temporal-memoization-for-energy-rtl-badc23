// tm_csr: memory-mapped registers of one temporal-memoization module.
//
// Software controls each memoization module through these registers:
//   CTRL   [0] enable: 0 power-gates the module (no hits, contents lost)
//          [1] allow commutative matching of operands 0 and 1
//   MASK   32-bit masking vector; a 1 bit is ignored when operands are
//          compared (0x00000000 exact matching, 0x00000FFF approximate)
//   PL_OP0..PL_OP2, PL_Q  an operand set and its result to preload
//   PL_GO  any write pushes the preload entry into the LUT (one-cycle pl_en)
// Writes take effect at the next clock edge; reads are combinational.
// Reset state: enabled, commutative matching on, exact matching.
//
// The masking-vector register, the enable and the preloading of
// pre-computed results are features of the design; the register map, the
// bus and the reset values are this implementation's choices.
module tm_csr
  import tm_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [2:0]                    addr,
  input  logic [FP_W-1:0]               wdata,
  output logic [FP_W-1:0]               rdata,
  output logic                          memo_en,
  output logic                          comm_en,
  output logic [FP_W-1:0]               mask,
  output logic                          pl_en,
  output logic [MAX_OPND-1:0][FP_W-1:0] pl_ops,
  output logic [FP_W-1:0]               pl_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      memo_en <= 1'b1;
      comm_en <= 1'b1;
      mask    <= MASK_EXACT;
      pl_en   <= 1'b0;
      pl_ops  <= '0;
      pl_q    <= '0;
    end else begin
      pl_en <= 1'b0;
      if (we) begin
        case (csr_addr_e'(addr))
          CSR_CTRL:   begin memo_en <= wdata[0]; comm_en <= wdata[1]; end
          CSR_MASK:   mask      <= wdata;
          CSR_PL_OP0: pl_ops[0] <= wdata;
          CSR_PL_OP1: pl_ops[1] <= wdata;
          CSR_PL_OP2: pl_ops[2] <= wdata;
          CSR_PL_Q:   pl_q      <= wdata;
          CSR_PL_GO:  pl_en     <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (csr_addr_e'(addr))
      CSR_CTRL:   rdata = {30'd0, comm_en, memo_en};
      CSR_MASK:   rdata = mask;
      CSR_PL_OP0: rdata = pl_ops[0];
      CSR_PL_OP1: rdata = pl_ops[1];
      CSR_PL_OP2: rdata = pl_ops[2];
      CSR_PL_Q:   rdata = pl_q;
      default:    rdata = '0;
    endcase
  end

endmodule
