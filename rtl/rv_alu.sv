// rv_alu: one copy of the RV32I arithmetic and logic unit with the branch comparator.
//
// result is the ALU operation on a and b (add, sub, shifts, set-less-than, logic); cmp is the
// branch condition of cmp_op on ca and cb (beq/bne/blt/bge/bltu/bgeu), the two source
// registers, while a and b compute the branch target. The document
// triplicates the ALU; the core instantiates three of these behind a tmr_voter. Combinational.
module rv_alu
  import soc_pkg::*;
(
  input  alu_op_e     op,
  input  cmp_op_e     cmp_op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] ca,
  input  logic [31:0] cb,
  output logic [31:0] result,
  output logic        cmp
);
  always_comb begin
    unique case (op)
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_SLL:  result = a << b[4:0];
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_XOR:  result = a ^ b;
      ALU_SRL:  result = a >> b[4:0];
      ALU_SRA:  result = 32'($signed(a) >>> b[4:0]);
      ALU_OR:   result = a | b;
      ALU_AND:  result = a & b;
      default:  result = a + b;
    endcase
    unique case (cmp_op)
      CMP_EQ:  cmp = (ca == cb);
      CMP_NE:  cmp = (ca != cb);
      CMP_LT:  cmp = $signed(ca) < $signed(cb);
      CMP_GE:  cmp = $signed(ca) >= $signed(cb);
      CMP_LTU: cmp = ca < cb;
      CMP_GEU: cmp = ca >= cb;
      default: cmp = 1'b0;
    endcase
  end
endmodule
