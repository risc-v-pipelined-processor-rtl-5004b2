// tb_regfile: checks the register file: reset to zero, x0 stays zero,
// random writes read back on both read ports and the debug port, against a model.
module tb_regfile;
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
  logic rst_n = 1'b0, we = 1'b0;
  logic [4:0] rs1 = '0, rs2 = '0, wa = '0, dbg_idx = '0;
  logic [31:0] rd1, rd2, wd = '0, dbg_data;
  logic [31:0] model [32];
  regfile dut (.clk, .rst_n, .rs1, .rs2, .rd1, .rd2, .we, .wa, .wd, .dbg_idx, .dbg_data);
  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    repeat (3000) begin
      we = 1'($urandom_range(0, 1)); wa = 5'($urandom); wd = $urandom;
      rs1 = 5'($urandom); rs2 = 5'($urandom); dbg_idx = 5'($urandom);
      #1;
      check(rd1 == model[rs1] && rd2 == model[rs2] && dbg_data == model[dbg_idx],
            $sformatf("read x%0d x%0d x%0d", rs1, rs2, dbg_idx));
      @(negedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
