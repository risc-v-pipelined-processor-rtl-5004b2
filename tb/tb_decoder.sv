// tb_decoder: checks instruction identification and register fields for
// every RV32I instruction, assembled with random fields in the testbench, and
// that unused register fields read as x0.
module tb_decoder;
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
  import rv_asm_pkg::*;
  u32 instr = '0;
  op_e op;
  logic [4:0] rs1, rs2, rd;
  decoder dut (.instr, .op, .rs1, .rs2, .rd);
  task automatic t(u32 w, op_e exp, int e1, int e2, int ed);
    instr = w;
    #1;
    check(op == exp && rs1 == 5'(e1) && rs2 == 5'(e2) && rd == 5'(ed),
          $sformatf("%h: op %s rs1 %0d rs2 %0d rd %0d, expect %s %0d %0d %0d",
                    w, op.name(), rs1, rs2, rd, exp.name(), e1, e2, ed));
  endtask
  initial begin
    automatic op_e rops[10] = '{OP_ADD, OP_SLL, OP_SLT, OP_SLTU, OP_XOR, OP_SRL, OP_OR, OP_AND, OP_SUB, OP_SRA};
    automatic int  rf3[10]  = '{0, 1, 2, 3, 4, 5, 6, 7, 0, 5};
    automatic op_e iops[6]  = '{OP_ADDI, OP_SLTI, OP_SLTIU, OP_XORI, OP_ORI, OP_ANDI};
    automatic int  if3[6]   = '{0, 2, 3, 4, 6, 7};
    automatic op_e bops[6]  = '{OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU};
    automatic int  bf3[6]   = '{0, 1, 4, 5, 6, 7};
    automatic op_e lops[5]  = '{OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU};
    automatic int  lf3[5]   = '{0, 1, 2, 4, 5};
    automatic op_e sops[3]  = '{OP_SB, OP_SH, OP_SW};
    repeat (50) begin
      automatic int a = $urandom_range(0, 31), b = $urandom_range(0, 31), d = $urandom_range(0, 31);
      automatic int imm = $urandom_range(0, 4095);
      for (int k = 0; k < 10; k++) t(r_type(k >= 8 ? 32 : 0, b, a, rf3[k], d), rops[k], a, b, d);
      for (int k = 0; k < 6; k++)  t(i_type(imm, a, if3[k], d, O_OPI), iops[k], a, 0, d);
      t(i_type(imm & 31, a, 1, d, O_OPI), OP_SLLI, a, 0, d);
      t(i_type(imm & 31, a, 5, d, O_OPI), OP_SRLI, a, 0, d);
      t(i_type((imm & 31) + 1024, a, 5, d, O_OPI), OP_SRAI, a, 0, d);
      for (int k = 0; k < 6; k++)  t(b_type(2 * imm, b, a, bf3[k]), bops[k], a, b, 0);
      for (int k = 0; k < 5; k++)  t(i_type(imm, a, lf3[k], d, O_LD), lops[k], a, 0, d);
      for (int k = 0; k < 3; k++)  t(s_type(imm, b, a, k), sops[k], a, b, 0);
      t(lui(d, imm), OP_LUI, 0, 0, d);
      t(auipc(d, imm), OP_AUIPC, 0, 0, d);
      t(jal(d, 2 * imm), OP_JAL, 0, 0, d);
      t(jalr(d, a, imm), OP_JALR, a, 0, d);
    end
    t(32'h0000_0073, OP_NOP, 0, 0, 0);      // ecall
    t(32'h0000_000F, OP_NOP, 0, 0, 0);      // fence
    t(32'h0000_0000, OP_INVALID, 0, 0, 0);
    t(r_type(1, 3, 2, 0, 1), OP_INVALID, 0, 0, 0);  // funct7 = 1 (M extension)
    t(i_type(0, 1, 3, 2, O_LD), OP_INVALID, 0, 0, 0); // ld (RV64)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
