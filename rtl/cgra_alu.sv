// cgra_alu: the combinational ALU of one reconfigurable cell.
//
// Computes the single-cycle 32-bit arithmetic, shift and logic operations and
// decides whether a jump instruction is taken. The operation code is taken
// straight from the aluOp field of the instruction word. Branches compare the
// two operands (BEQ/BNE/BLT/BGE) or test the value picked by muxFsel for zero
// (BZF) or a set sign bit (BSF). Shift amounts are the low five bits of B.
// Multiplication is not done here (see cgra_mul); result_o is then zero.
// The document names the operation classes (basic arithmetic and logic,
// conditional and unconditional jumps); the exact operation set is this
// design's own choice.
module cgra_alu
  import cgra_pkg::*;
(
  input  logic [5:0]  op_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic [31:0] flag_src_i,   // value whose flags BZF/BSF test
  output logic [31:0] result_o,
  output logic        branch_o      // jump taken
);

  always_comb begin
    result_o = '0;
    branch_o = 1'b0;
    unique case (op_i)
      OP_SADD: result_o = a_i + b_i;
      OP_SSUB: result_o = a_i - b_i;
      OP_SLL:  result_o = a_i << b_i[4:0];
      OP_SRL:  result_o = a_i >> b_i[4:0];
      OP_SRA:  result_o = $unsigned($signed(a_i) >>> b_i[4:0]);
      OP_LAND: result_o = a_i & b_i;
      OP_LOR:  result_o = a_i | b_i;
      OP_LXOR: result_o = a_i ^ b_i;
      OP_BEQ:  branch_o = (a_i == b_i);
      OP_BNE:  branch_o = (a_i != b_i);
      OP_BLT:  branch_o = ($signed(a_i) <  $signed(b_i));
      OP_BGE:  branch_o = ($signed(a_i) >= $signed(b_i));
      OP_BZF:  branch_o = (flag_src_i == '0);
      OP_BSF:  branch_o = flag_src_i[31];
      OP_JUMP: branch_o = 1'b1;
      default: ;
    endcase
  end

endmodule
