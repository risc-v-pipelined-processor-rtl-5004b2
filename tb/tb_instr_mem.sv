// tb_instr_mem: loads words through the write port and reads them back at
// word and halfword-aligned addresses (an instruction straddling two words),
// against a model of the byte contents.
module tb_instr_mem;
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
  localparam int BYTES = 256;
  logic we = 1'b0;
  logic [31:0] addr = '0, waddr = '0, wdata = '0, instr;
  logic [15:0] model [BYTES/2];
  instr_mem #(.BYTES(BYTES)) dut (.clk, .addr, .instr, .we, .waddr, .wdata);
  initial begin
    for (int i = 0; i < BYTES / 4; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 32'(4 * i); wdata = $urandom;
      model[2*i] = wdata[15:0]; model[2*i+1] = wdata[31:16];
    end
    @(negedge clk);
    we = 1'b0;
    repeat (1000) begin
      automatic int h = $urandom_range(0, BYTES / 2 - 1);
      addr = 32'(2 * h);
      #1;
      check(instr == {model[(h + 1) % (BYTES / 2)], model[h]}, $sformatf("read at %h", addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
