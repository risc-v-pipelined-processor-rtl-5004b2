// riscv_pkg: types and constants shared by the blocks of the 5-stage RV32I(+C)
// pipeline.
//
// The pipeline carries, between stages, a control word produced in Decode by the
// control block. Its fields and their widths follow the control word drawn in the
// datapath (1, 2, 1, 1, 4, 1 bits feeding the memory/writeback side, and
// 1, 1, 1, 5, 3 bits feeding the execute side); the encodings of each field
// (which code means which ALU operation, memory operation, and so on) are this
// design's own choice. The internal 6-bit instruction code op_e, passed from the
// decoder to control and to the immediate generator, is also this design's own.
//
// Pipeline registers run in one of three modes: NORMAL (load), STALL (hold) and
// BUBBLE (load a no-operation).
package riscv_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Internal instruction identity (6 bits): produced by the decoder.
  typedef enum logic [5:0] {
    OP_INVALID = 6'd0,
    OP_LUI, OP_AUIPC, OP_JAL, OP_JALR,
    OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU,
    OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU,
    OP_SB, OP_SH, OP_SW,
    OP_ADDI, OP_SLTI, OP_SLTIU, OP_XORI, OP_ORI, OP_ANDI,
    OP_SLLI, OP_SRLI, OP_SRAI,
    OP_ADD, OP_SUB, OP_SLL, OP_SLT, OP_SLTU, OP_XOR, OP_SRL, OP_SRA, OP_OR, OP_AND,
    OP_NOP  // FENCE, ECALL, EBREAK, CSR*: executed as no-operations
  } op_e;

  // ALU operation (5 bits).
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASS_B, ALU_ADD_JALR
  } alu_op_e;

  // Memory operation (4 bits).
  typedef enum logic [3:0] {
    MEM_NOP, MEM_LB, MEM_LH, MEM_LW, MEM_LBU, MEM_LHU, MEM_SB, MEM_SH, MEM_SW
  } mem_op_e;

  // Branch condition (3 bits) = funct3 of the RV32I branch.
  typedef enum logic [2:0] {
    BR_EQ = 3'b000, BR_NE = 3'b001, BR_LT = 3'b100,
    BR_GE = 3'b101, BR_LTU = 3'b110, BR_GEU = 3'b111
  } br_op_e;

  // Writeback source (2 bits): ALU result, memory read, PC+4 (return address).
  typedef enum logic [1:0] { WB_ALU = 2'd0, WB_MEM = 2'd1, WB_PC4 = 2'd2 } wb_src_e;

  // ALU operand selects.
  typedef enum logic { OP1_RS1 = 1'b0, OP1_PC  = 1'b1 } op1_sel_e;
  typedef enum logic { OP2_RS2 = 1'b0, OP2_IMM = 1'b1 } op2_sel_e;

  typedef struct packed {
    logic     reg_do_write;
    wb_src_e  reg_wr_src_ctl;
    logic     mem_do_write;
    logic     mem_do_read;
    mem_op_e  mem_op;
    logic     do_jmp;
    op1_sel_e alu_op1_ctl;
    op2_sel_e alu_op2_ctl;
    logic     do_br;
    alu_op_e  alu_ctl;
    br_op_e   br_op;
  } ctrl_t;

  // Control word of a bubble: writes nothing, branches nowhere.
  localparam ctrl_t CTRL_NOP = '{
    reg_do_write: 1'b0, reg_wr_src_ctl: WB_ALU, mem_do_write: 1'b0, mem_do_read: 1'b0,
    mem_op: MEM_NOP, do_jmp: 1'b0, alu_op1_ctl: OP1_RS1, alu_op2_ctl: OP2_RS2,
    do_br: 1'b0, alu_ctl: ALU_ADD, br_op: BR_EQ
  };

  // Pipeline register modes.
  typedef enum logic [1:0] { PIPE_NORMAL = 2'd0, PIPE_STALL = 2'd1, PIPE_BUBBLE = 2'd2 } pipe_mode_e;

  // Decode operand sources chosen by the forwarding unit.
  typedef enum logic [1:0] { FWD_RF = 2'd0, FWD_EX = 2'd1, FWD_MEM = 2'd2, FWD_WB = 2'd3 } fwd_sel_e;

  // IF/ID payload.
  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t pc4;    // PC + 4, or PC + 2 after a compressed instruction
    word_t instr;  // 32-bit (expanded) instruction
  } ifid_t;

  // ID/EX payload.
  typedef struct packed {
    logic     valid;
    ctrl_t    ctl;
    word_t    pc;
    word_t    pc4;
    word_t    r1;
    word_t    r2;
    word_t    imm;
    reg_idx_t rd;
  } idex_t;

  // EX/MEM payload.
  typedef struct packed {
    logic     valid;
    ctrl_t    ctl;
    word_t    pc;
    word_t    pc4;
    word_t    alures;
    word_t    r2;
    reg_idx_t rd;
  } exmem_t;

  // MEM/WB payload.
  typedef struct packed {
    logic     valid;
    ctrl_t    ctl;
    word_t    pc;
    word_t    pc4;
    word_t    alures;
    word_t    memres;
    reg_idx_t rd;
  } memwb_t;

  // Value an instruction will write back, given its source select.
  function automatic word_t wb_value(wb_src_e src, word_t alures, word_t memres, word_t pc4);
    unique case (src)
      WB_MEM:  return memres;
      WB_PC4:  return pc4;
      default: return alures;
    endcase
  endfunction

endpackage
