// branch_unit: branch condition evaluation in the Execute stage.
//
// Compares the two register operands a (rs1) and b (rs2) for the condition
// br_op (equal, not equal, signed/unsigned less than, signed/unsigned greater or
// equal) and raises taken when it holds. The pipeline ANDs taken with the
// branch flag and ORs in the jump flag to redirect the PC. Combinational.
// br_op is the 3-bit funct3 of the branch instruction.
module branch_unit
  import riscv_pkg::*;
(
  input  br_op_e br_op,
  input  word_t  a,
  input  word_t  b,
  output logic   taken
);

  always_comb begin
    unique case (br_op)
      BR_EQ:   taken = (a == b);
      BR_NE:   taken = (a != b);
      BR_LT:   taken = ($signed(a) <  $signed(b));
      BR_GE:   taken = ($signed(a) >= $signed(b));
      BR_LTU:  taken = (a <  b);
      BR_GEU:  taken = (a >= b);
      default: taken = 1'b0;
    endcase
  end

endmodule
