// alu: integer arithmetic unit of the execution stage.
//
// Purely combinational: one RV32I arithmetic/logic operation per cycle on two
// 32-bit operands. The core instantiates two of these, one per ALU issue port,
// as the design prescribes. The operand selection (register, PC or immediate)
// is done before the unit; the op encoding (alu_op_e) is this
// implementation's own.
module alu
  import rv_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_SLL:  y = a << b[4:0];
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_XOR:  y = a ^ b;
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      ALU_LUI:  y = b;
      default:  y = '0;
    endcase
  end
endmodule
