// tb_fetch_pc: checks the program counter: reset value, PC+4 and PC+2 steps,
// hold when disabled, and redirect to a target taking priority, against a model.
module tb_fetch_pc;
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
  logic rst_n = 1'b0, en = 1'b0, is_c = 1'b0, redirect = 1'b0;
  logic [31:0] target = '0, pc, seq, model;
  fetch_pc #(.RESET_PC(32'h100)) dut (.clk, .rst_n, .en, .is_compressed(is_c), .redirect,
                                      .target, .pc, .pc_next_seq(seq));
  initial begin
    @(negedge clk); @(negedge clk);
    check(pc == 32'h100, "reset PC");
    rst_n = 1'b1;
    model = 32'h100;
    repeat (2000) begin
      en = ($urandom_range(0, 3) != 0);
      is_c = 1'($urandom_range(0, 1));
      redirect = ($urandom_range(0, 5) == 0);
      target = $urandom & 32'hFFFF_FFFE;
      #1;
      check(seq == model + (is_c ? 32'd2 : 32'd4), "sequential successor");
      @(negedge clk);
      if (redirect) model = target;
      else if (en) model = model + (is_c ? 32'd2 : 32'd4);
      check(pc == model, $sformatf("pc %h expect %h", pc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
