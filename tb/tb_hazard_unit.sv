// tb_hazard_unit: checks the pipeline control table: load/use gives
// IF stall, ID stall, EX bubble; a taken branch or jump gives ID and EX
// bubbles; otherwise all stages normal; MEM and WB always normal.
module tb_hazard_unit;
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
  logic ex_is_load = 1'b0, ex_redirect = 1'b0, load_use;
  logic [4:0] ex_rd = '0, id_rs1 = '0, id_rs2 = '0;
  pipe_mode_e mif, mid, mex, mmem, mwb;
  hazard_unit dut (.ex_is_load, .ex_rd, .id_rs1, .id_rs2, .ex_redirect, .load_use,
                   .mode_if(mif), .mode_id(mid), .mode_ex(mex), .mode_mem(mmem), .mode_wb(mwb));
  initial begin
    automatic int n_lu = 0, n_mp = 0;
    repeat (5000) begin
      bit lu;
      ex_is_load = 1'($urandom);
      ex_redirect = !ex_is_load && ($urandom_range(0, 2) == 0);
      ex_rd = 5'($urandom_range(0, 3)); id_rs1 = 5'($urandom_range(0, 3)); id_rs2 = 5'($urandom_range(0, 3));
      #1;
      lu = ex_is_load && ex_rd != 0 && (ex_rd == id_rs1 || ex_rd == id_rs2);
      check(load_use == lu, "load/use detection");
      if (ex_redirect) begin
        n_mp++;
        check(mif == PIPE_NORMAL && mid == PIPE_BUBBLE && mex == PIPE_BUBBLE, "mispredict actions");
      end else if (lu) begin
        n_lu++;
        check(mif == PIPE_STALL && mid == PIPE_STALL && mex == PIPE_BUBBLE, "load/use actions");
      end else begin
        check(mif == PIPE_NORMAL && mid == PIPE_NORMAL && mex == PIPE_NORMAL, "normal actions");
      end
      check(mmem == PIPE_NORMAL && mwb == PIPE_NORMAL, "MEM and WB normal");
    end
    check(n_lu > 0 && n_mp > 0, "both conditions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
