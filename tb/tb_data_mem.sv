// tb_data_mem: checks byte, halfword and word stores and sign/zero-extended
// loads at random aligned addresses against a byte-array model.
module tb_data_mem;
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
  localparam int BYTES = 256;
  logic [31:0] addr = '0, wdata = '0, rdata, exp;
  logic we = 1'b0;
  mem_op_e mem_op = MEM_NOP;
  logic [7:0] model [BYTES];
  data_mem #(.BYTES(BYTES)) dut (.clk, .addr, .wdata, .we, .mem_op, .rdata);
  initial begin
    for (int i = 0; i < BYTES / 4; i++) begin
      @(negedge clk);
      we = 1'b1; mem_op = MEM_SW; addr = 32'(4 * i); wdata = '0;
    end
    @(negedge clk);
    foreach (model[i]) model[i] = '0;
    repeat (4000) begin
      automatic int k = $urandom_range(0, 7);
      automatic int size = (k == 0 || k == 3 || k == 5) ? 1 : (k == 1 || k == 4 || k == 6) ? 2 : 4;
      automatic int a = size * $urandom_range(0, BYTES / size - 1);
      automatic mem_op_e ops[8] = '{MEM_SB, MEM_SH, MEM_SW, MEM_LB, MEM_LH, MEM_LBU, MEM_LHU, MEM_LW};
      mem_op = ops[k];
      we = (k < 3);
      addr = 32'(a);
      wdata = $urandom;
      #1;
      if (!we) begin
        case (mem_op)
          MEM_LB:  exp = {{24{model[a][7]}}, model[a]};
          MEM_LBU: exp = {24'h0, model[a]};
          MEM_LH:  exp = {{16{model[a+1][7]}}, model[a+1], model[a]};
          MEM_LHU: exp = {16'h0, model[a+1], model[a]};
          default: exp = {model[a+3], model[a+2], model[a+1], model[a]};
        endcase
        check(rdata == exp, $sformatf("%s at %0d: %h expect %h", mem_op.name(), a, rdata, exp));
      end
      @(negedge clk);
      if (we) for (int i = 0; i < size; i++) model[a + i] = wdata[8*i +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
