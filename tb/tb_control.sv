// tb_control: checks the control word of every instruction code against a
// table written out in the testbench: register write and its source, memory
// read/write and width, jump/branch flags and condition, ALU operands and
// operation; invalid codes must give the bubble word.
module tb_control;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  import riscv_pkg::*;
  op_e op = OP_INVALID;
  ctrl_t ctl;
  control dut (.op, .ctl);
  // wr src mw mr memop jmp op1pc op2imm br alu brop
  task automatic t(op_e o, bit wr, wb_src_e src, bit mw, bit mr, mem_op_e mo, bit j,
                   bit pc1, bit imm2, bit br, alu_op_e a, br_op_e bo);
    op = o;
    #1;
    check(ctl.reg_do_write == wr && (!wr || ctl.reg_wr_src_ctl == src) && ctl.mem_do_write == mw &&
          ctl.mem_do_read == mr && ctl.mem_op == mo && ctl.do_jmp == j && ctl.do_br == br &&
          (ctl.alu_op1_ctl == OP1_PC) == pc1 && (ctl.alu_op2_ctl == OP2_IMM) == imm2 &&
          ctl.alu_ctl == a && (!br || ctl.br_op == bo), $sformatf("control word of %s", o.name()));
  endtask
  initial begin
    t(OP_LUI,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_PASS_B, BR_EQ);
    t(OP_AUIPC, 1, WB_ALU, 0, 0, MEM_NOP, 0, 1, 1, 0, ALU_ADD, BR_EQ);
    t(OP_JAL,   1, WB_PC4, 0, 0, MEM_NOP, 1, 1, 1, 0, ALU_ADD, BR_EQ);
    t(OP_JALR,  1, WB_PC4, 0, 0, MEM_NOP, 1, 0, 1, 0, ALU_ADD_JALR, BR_EQ);
    t(OP_BEQ,   0, WB_ALU, 0, 0, MEM_NOP, 0, 1, 1, 1, ALU_ADD, BR_EQ);
    t(OP_BNE,   0, WB_ALU, 0, 0, MEM_NOP, 0, 1, 1, 1, ALU_ADD, BR_NE);
    t(OP_BLT,   0, WB_ALU, 0, 0, MEM_NOP, 0, 1, 1, 1, ALU_ADD, BR_LT);
    t(OP_BGE,   0, WB_ALU, 0, 0, MEM_NOP, 0, 1, 1, 1, ALU_ADD, BR_GE);
    t(OP_BLTU,  0, WB_ALU, 0, 0, MEM_NOP, 0, 1, 1, 1, ALU_ADD, BR_LTU);
    t(OP_BGEU,  0, WB_ALU, 0, 0, MEM_NOP, 0, 1, 1, 1, ALU_ADD, BR_GEU);
    t(OP_LB,    1, WB_MEM, 0, 1, MEM_LB,  0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_LH,    1, WB_MEM, 0, 1, MEM_LH,  0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_LW,    1, WB_MEM, 0, 1, MEM_LW,  0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_LBU,   1, WB_MEM, 0, 1, MEM_LBU, 0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_LHU,   1, WB_MEM, 0, 1, MEM_LHU, 0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_SB,    0, WB_ALU, 1, 0, MEM_SB,  0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_SH,    0, WB_ALU, 1, 0, MEM_SH,  0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_SW,    0, WB_ALU, 1, 0, MEM_SW,  0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_ADDI,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_ADD, BR_EQ);
    t(OP_SLTI,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_SLT, BR_EQ);
    t(OP_SLTIU, 1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_SLTU, BR_EQ);
    t(OP_XORI,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_XOR, BR_EQ);
    t(OP_ORI,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_OR, BR_EQ);
    t(OP_ANDI,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_AND, BR_EQ);
    t(OP_SLLI,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_SLL, BR_EQ);
    t(OP_SRLI,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_SRL, BR_EQ);
    t(OP_SRAI,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 1, 0, ALU_SRA, BR_EQ);
    t(OP_ADD,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_ADD, BR_EQ);
    t(OP_SUB,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_SUB, BR_EQ);
    t(OP_SLL,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_SLL, BR_EQ);
    t(OP_SLT,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_SLT, BR_EQ);
    t(OP_SLTU,  1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_SLTU, BR_EQ);
    t(OP_XOR,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_XOR, BR_EQ);
    t(OP_SRL,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_SRL, BR_EQ);
    t(OP_SRA,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_SRA, BR_EQ);
    t(OP_OR,    1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_OR, BR_EQ);
    t(OP_AND,   1, WB_ALU, 0, 0, MEM_NOP, 0, 0, 0, 0, ALU_AND, BR_EQ);
    op = OP_INVALID; #1; check(ctl == CTRL_NOP, "invalid gives bubble word");
    op = OP_NOP;     #1; check(ctl == CTRL_NOP, "no-op gives bubble word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
