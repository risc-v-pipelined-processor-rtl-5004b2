// control: main control of the Decode stage.
//
// Maps the decoder's instruction code to the control word ctrl_t that travels
// with the instruction down the pipeline:
//   reg_do_write / reg_wr_src_ctl  - write a register, from ALU, memory or PC+4;
//   mem_do_write / mem_do_read / mem_op - store, load and its width/sign;
//   do_jmp / do_br / br_op          - jump, conditional branch and its condition;
//   alu_op1_ctl / alu_op2_ctl / alu_ctl - ALU operands (rs1 or PC, rs2 or
//                                        immediate) and operation.
// Branches and jumps compute their target in the ALU (PC + imm, or rs1 + imm
// with bit 0 cleared for jalr). Invalid instructions and no-ops get the bubble
// word CTRL_NOP. Combinational. The field list follows the design's control
// signals; their encodings are this design's own.
module control
  import riscv_pkg::*;
(
  input  op_e   op,
  output ctrl_t ctl
);

  always_comb begin
    ctl = CTRL_NOP;
    unique case (op)
      OP_LUI: begin
        ctl.reg_do_write = 1'b1; ctl.alu_op2_ctl = OP2_IMM; ctl.alu_ctl = ALU_PASS_B;
      end
      OP_AUIPC: begin
        ctl.reg_do_write = 1'b1; ctl.alu_op1_ctl = OP1_PC; ctl.alu_op2_ctl = OP2_IMM;
      end
      OP_JAL: begin
        ctl.reg_do_write = 1'b1; ctl.reg_wr_src_ctl = WB_PC4; ctl.do_jmp = 1'b1;
        ctl.alu_op1_ctl = OP1_PC; ctl.alu_op2_ctl = OP2_IMM;
      end
      OP_JALR: begin
        ctl.reg_do_write = 1'b1; ctl.reg_wr_src_ctl = WB_PC4; ctl.do_jmp = 1'b1;
        ctl.alu_op2_ctl = OP2_IMM; ctl.alu_ctl = ALU_ADD_JALR;
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU: begin
        ctl.do_br = 1'b1; ctl.alu_op1_ctl = OP1_PC; ctl.alu_op2_ctl = OP2_IMM;
        unique case (op)
          OP_BEQ:  ctl.br_op = BR_EQ;
          OP_BNE:  ctl.br_op = BR_NE;
          OP_BLT:  ctl.br_op = BR_LT;
          OP_BGE:  ctl.br_op = BR_GE;
          OP_BLTU: ctl.br_op = BR_LTU;
          default: ctl.br_op = BR_GEU;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctl.reg_do_write = 1'b1; ctl.reg_wr_src_ctl = WB_MEM; ctl.mem_do_read = 1'b1;
        ctl.alu_op2_ctl = OP2_IMM;
        unique case (op)
          OP_LB:   ctl.mem_op = MEM_LB;
          OP_LH:   ctl.mem_op = MEM_LH;
          OP_LW:   ctl.mem_op = MEM_LW;
          OP_LBU:  ctl.mem_op = MEM_LBU;
          default: ctl.mem_op = MEM_LHU;
        endcase
      end
      OP_SB, OP_SH, OP_SW: begin
        ctl.mem_do_write = 1'b1; ctl.alu_op2_ctl = OP2_IMM;
        unique case (op)
          OP_SB:   ctl.mem_op = MEM_SB;
          OP_SH:   ctl.mem_op = MEM_SH;
          default: ctl.mem_op = MEM_SW;
        endcase
      end
      OP_ADDI, OP_SLTI, OP_SLTIU, OP_XORI, OP_ORI, OP_ANDI, OP_SLLI, OP_SRLI, OP_SRAI: begin
        ctl.reg_do_write = 1'b1; ctl.alu_op2_ctl = OP2_IMM;
        unique case (op)
          OP_SLTI:  ctl.alu_ctl = ALU_SLT;
          OP_SLTIU: ctl.alu_ctl = ALU_SLTU;
          OP_XORI:  ctl.alu_ctl = ALU_XOR;
          OP_ORI:   ctl.alu_ctl = ALU_OR;
          OP_ANDI:  ctl.alu_ctl = ALU_AND;
          OP_SLLI:  ctl.alu_ctl = ALU_SLL;
          OP_SRLI:  ctl.alu_ctl = ALU_SRL;
          OP_SRAI:  ctl.alu_ctl = ALU_SRA;
          default:  ctl.alu_ctl = ALU_ADD;
        endcase
      end
      OP_ADD, OP_SUB, OP_SLL, OP_SLT, OP_SLTU, OP_XOR, OP_SRL, OP_SRA, OP_OR, OP_AND: begin
        ctl.reg_do_write = 1'b1;
        unique case (op)
          OP_SUB:  ctl.alu_ctl = ALU_SUB;
          OP_SLL:  ctl.alu_ctl = ALU_SLL;
          OP_SLT:  ctl.alu_ctl = ALU_SLT;
          OP_SLTU: ctl.alu_ctl = ALU_SLTU;
          OP_XOR:  ctl.alu_ctl = ALU_XOR;
          OP_SRL:  ctl.alu_ctl = ALU_SRL;
          OP_SRA:  ctl.alu_ctl = ALU_SRA;
          OP_OR:   ctl.alu_ctl = ALU_OR;
          OP_AND:  ctl.alu_ctl = ALU_AND;
          default: ctl.alu_ctl = ALU_ADD;
        endcase
      end
      default: ctl = CTRL_NOP;
    endcase
  end

endmodule
