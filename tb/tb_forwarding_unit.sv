// tb_forwarding_unit: checks operand source selection: youngest matching
// stage (EX, then MEM, then WB) wins, x0 and non-writing stages never forward,
// against a model over random register indices.
module tb_forwarding_unit;
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
  logic [4:0] rs1 = '0, rs2 = '0, ex_rd = '0, mem_rd = '0, wb_rd = '0;
  logic ex_we = 1'b0, mem_we = 1'b0, wb_we = 1'b0;
  fwd_sel_e fwd1, fwd2;
  forwarding_unit dut (.rs1, .rs2, .ex_we, .ex_rd, .mem_we, .mem_rd, .wb_we, .wb_rd, .fwd1, .fwd2);
  function automatic fwd_sel_e model(logic [4:0] r);
    fwd_sel_e s = FWD_RF;
    if (r != 0) begin
      if (wb_we && wb_rd == r) s = FWD_WB;
      if (mem_we && mem_rd == r) s = FWD_MEM;
      if (ex_we && ex_rd == r) s = FWD_EX;
    end
    return s;
  endfunction
  initial begin
    automatic int hit_ex = 0, hit_mem = 0, hit_wb = 0;
    repeat (5000) begin
      rs1 = 5'($urandom_range(0, 3)); rs2 = 5'($urandom_range(0, 3));
      ex_rd = 5'($urandom_range(0, 3)); mem_rd = 5'($urandom_range(0, 3)); wb_rd = 5'($urandom_range(0, 3));
      ex_we = 1'($urandom); mem_we = 1'($urandom); wb_we = 1'($urandom);
      #1;
      check(fwd1 == model(rs1) && fwd2 == model(rs2), "forward select");
      if (fwd1 == FWD_EX) hit_ex++;
      if (fwd1 == FWD_MEM) hit_mem++;
      if (fwd1 == FWD_WB) hit_wb++;
    end
    check(hit_ex > 0 && hit_mem > 0 && hit_wb > 0, "all sources exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
