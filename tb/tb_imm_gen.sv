// tb_imm_gen: checks the immediate of every format: random immediates are
// encoded with the testbench assembler and must come back sign-extended.
module tb_imm_gen;
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
  u32 instr = '0, imm;
  op_e op = OP_INVALID;
  imm_gen dut (.instr, .op, .imm);
  task automatic t(u32 w, op_e o, u32 exp, string f);
    instr = w; op = o;
    #1;
    check(imm == exp, $sformatf("%s format: %h expect %h", f, imm, exp));
  endtask
  initial begin
    repeat (500) begin
      automatic int i12 = int'($signed(12'($urandom))), i13 = 2 * int'($signed(12'($urandom)));
      automatic int i21 = 2 * $signed(20'($urandom));
      automatic int u20 = $urandom_range(0, 32'hFFFFF);
      automatic int a = $urandom_range(0, 31), d = $urandom_range(0, 31);
      t(addi(d, a, i12), OP_ADDI, u32'(i12), "I");
      t(lw(d, a, i12), OP_LW, u32'(i12), "I (load)");
      t(jalr(d, a, i12), OP_JALR, u32'(i12), "I (jalr)");
      t(sw(d, a, i12), OP_SW, u32'(i12), "S");
      t(beq(a, d, i13), OP_BEQ, u32'(i13), "B");
      t(lui(d, u20), OP_LUI, u32'(u20) << 12, "U");
      t(auipc(d, u20), OP_AUIPC, u32'(u20) << 12, "U (auipc)");
      t(jal(d, i21), OP_JAL, u32'(i21), "J");
      t(i_type(1024 + (a & 31), a, 5, d, O_OPI), OP_SRAI, u32'(a & 31), "shift amount");
      t(add(d, a, a), OP_ADD, '0, "none");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
