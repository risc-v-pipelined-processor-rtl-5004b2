// alu: arithmetic-logic unit of the Execute stage.
//
// Computes res = a <op> b for the operation ctl: add, subtract, shift left,
// logical and arithmetic shift right (by b[4:0]), signed and unsigned
// set-less-than, xor, or, and. PASS_B returns b (lui) and ADD_JALR returns
// a + b with bit 0 cleared (jalr target). For branches, jumps and auipc the
// operands are PC and immediate, so res is the target address. Combinational.
// The operation set follows RV32I; the encoding is this design's own.
module alu
  import riscv_pkg::*;
(
  input  alu_op_e ctl,
  input  word_t   a,
  input  word_t   b,
  output word_t   res
);

  word_t sum;
  assign sum = a + b;

  always_comb begin
    unique case (ctl)
      ALU_ADD:      res = sum;
      ALU_SUB:      res = a - b;
      ALU_SLL:      res = a << b[4:0];
      ALU_SLT:      res = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:     res = {31'b0, a < b};
      ALU_XOR:      res = a ^ b;
      ALU_SRL:      res = a >> b[4:0];
      ALU_SRA:      res = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:       res = a | b;
      ALU_AND:      res = a & b;
      ALU_PASS_B:   res = b;
      ALU_ADD_JALR: res = {sum[31:1], 1'b0};
      default:      res = sum;
    endcase
  end

endmodule
