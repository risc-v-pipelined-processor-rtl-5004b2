// tb_branch_unit: checks every branch condition on random and equal or
// sign-boundary operands against a model.
module tb_branch_unit;
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
  br_op_e br_op = BR_EQ;
  logic [31:0] a = '0, b = '0;
  logic taken, exp;
  branch_unit dut (.br_op, .a, .b, .taken);
  initial begin
    automatic br_op_e ops[6] = '{BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU};
    for (int n = 0; n < 3000; n++) begin
      br_op = ops[$urandom_range(0, 5)];
      a = $urandom;
      b = (n % 3 == 0) ? a : (n % 3 == 1) ? (a ^ 32'h8000_0000) : $urandom;
      #1;
      case (br_op)
        BR_EQ:  exp = (a == b);
        BR_NE:  exp = (a != b);
        BR_LT:  exp = (int'(a) < int'(b));
        BR_GE:  exp = !(int'(a) < int'(b));
        BR_LTU: exp = ({1'b0, a} < {1'b0, b});
        default: exp = !({1'b0, a} < {1'b0, b});
      endcase
      check(taken == exp, $sformatf("%s %h %h", br_op.name(), a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
