// tb_pipe_reg: checks the three pipeline register modes (normal loads, stall
// holds, bubble loads the no-operation value) and reset, against a model, with
// random modes and data.
module tb_pipe_reg;
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
  logic rst_n = 1'b0;
  pipe_mode_e mode = PIPE_NORMAL;
  logic [15:0] d = '0, q, model;
  localparam logic [15:0] BUB = 16'hB0B0;
  pipe_reg #(.T(logic [15:0])) dut (.clk, .rst_n, .mode, .d, .bubble_val(BUB), .q);
  initial begin
    @(negedge clk); @(negedge clk);
    check(q == BUB, "reset loads the bubble value");
    rst_n = 1'b1;
    model = BUB;
    repeat (2000) begin
      automatic int m = $urandom_range(0, 2);
      mode = pipe_mode_e'(m);
      d = 16'($urandom);
      @(negedge clk);
      if (m == 0) model = d;
      else if (m == 2) model = BUB;
      check(q == model, $sformatf("mode %0d: q %h expect %h", m, q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
