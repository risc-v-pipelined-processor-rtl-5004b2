// tb_alu: checks every ALU operation on random and corner operands
// against a model written with the testbench's own arithmetic.
module tb_alu;
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
  alu_op_e ctl = ALU_ADD;
  logic [31:0] a = '0, b = '0, res, exp;
  alu dut (.ctl, .a, .b, .res);
  initial begin
    automatic logic [31:0] corner[6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1F};
    for (int n = 0; n < 3000; n++) begin
      ctl = alu_op_e'($urandom_range(0, 11));
      a = (n % 4 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = (n % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      #1;
      case (ctl)
        ALU_ADD:  exp = a + b;
        ALU_SUB:  exp = a + ~b + 1;
        ALU_SLL:  exp = a << (b % 32);
        ALU_SLT:  exp = (int'(a) < int'(b)) ? 1 : 0;
        ALU_SLTU: exp = ({1'b0, a} < {1'b0, b}) ? 1 : 0;
        ALU_XOR:  exp = a ^ b;
        ALU_SRL:  exp = a >> (b % 32);
        ALU_SRA:  begin exp = a; for (int i = 0; i < (b % 32); i++) exp = {exp[31], exp[31:1]}; end
        ALU_OR:   exp = a | b;
        ALU_AND:  exp = a & b;
        ALU_PASS_B: exp = b;
        default:  exp = (a + b) & 32'hFFFF_FFFE;
      endcase
      check(res == exp, $sformatf("%s %h %h: %h expect %h", ctl.name(), a, b, res, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
