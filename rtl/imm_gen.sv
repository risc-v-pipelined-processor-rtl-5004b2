// imm_gen: immediate generator of the Decode stage.
//
// Builds the sign-extended 32-bit immediate of the instruction from its bit
// fields, choosing the RV32I format (I, S, B, U or J) from the decoder's
// instruction code. Shift-immediate instructions get their 5-bit shift amount
// zero-extended; instructions without an immediate get 0. Combinational.
module imm_gen
  import riscv_pkg::*;
(
  input  word_t instr,
  input  op_e   op,
  output word_t imm
);

  word_t imm_i, imm_s, imm_b, imm_u, imm_j;

  assign imm_i = {{20{instr[31]}}, instr[31:20]};
  assign imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {instr[31:12], 12'h000};
  assign imm_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  always_comb begin
    unique case (op)
      OP_LUI, OP_AUIPC:                                   imm = imm_u;
      OP_JAL:                                             imm = imm_j;
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU:   imm = imm_b;
      OP_SB, OP_SH, OP_SW:                                imm = imm_s;
      OP_SLLI, OP_SRLI, OP_SRAI:                          imm = {27'h0, instr[24:20]};
      OP_JALR, OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU,
      OP_ADDI, OP_SLTI, OP_SLTIU, OP_XORI, OP_ORI, OP_ANDI: imm = imm_i;
      default:                                            imm = '0;
    endcase
  end

endmodule
