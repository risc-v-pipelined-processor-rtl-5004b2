// tb_compressed_decoder: checks the RV32C expansion against 32-bit encodings
// assembled independently in the testbench, one vector per compressed
// instruction form, plus pass-through of random 32-bit instructions.
module tb_compressed_decoder;
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
  import rv_asm_pkg::*;
  logic [31:0] in = '0, out;
  logic        isc;
  compressed_decoder dut (.instr_in(in), .instr_out(out), .is_compressed(isc));
  task automatic vec(logic [15:0] c, u32 exp, string name);
    in = {16'hFFFF, c};
    #1;
    check(isc == 1'b1 && out == exp, $sformatf("%s: %h -> %h, expect %h", name, c, out, exp));
  endtask
  initial begin
    vec(16'h0085, addi(1, 1, 1),           "c.addi");
    vec(16'h0001, nop(),                   "c.nop");
    vec(16'h4515, addi(10, 0, 5),          "c.li");
    vec(16'h852e, add(10, 0, 11),          "c.mv");
    vec(16'h952e, add(10, 10, 11),         "c.add");
    vec(16'h4188, lw(10, 11, 0),           "c.lw");
    vec(16'hc1c8, sw(10, 11, 4),           "c.sw");
    vec(16'h41C8, lw(10, 11, 4),           "c.lw +4");
    vec(16'h41A8, lw(10, 11, 64),          "c.lw +64");
    vec(16'h8082, jalr(0, 1, 0),           "c.jr");
    vec(16'h9282, jalr(1, 5, 0),           "c.jalr");
    vec(16'h0808, addi(10, 2, 16),         "c.addi4spn");
    vec(16'hA019, jal(0, 6),               "c.j");
    vec(16'hB001, jal(0, -2048),           "c.j back");
    vec(16'h2019, jal(1, 6),               "c.jal");
    vec(16'hE099, bne(9, 0, 6),            "c.bnez");
    vec(16'hDC7D, beq(8, 0, -2),           "c.beqz back");
    vec(16'h4522, lw(10, 2, 8),            "c.lwsp");
    vec(16'hC422, sw(8, 2, 8),             "c.swsp");
    vec(16'h6785, lui(15, 1),              "c.lui");
    vec(16'h77FD, lui(15, 32'hFFFFF),      "c.lui neg");
    vec(16'h1141, addi(2, 2, -16),         "c.addi sp");
    vec(16'h717D, addi(2, 2, -16),         "c.addi16sp");
    vec(16'h800D, i_type(3, 8, 5, 8, O_OPI),        "c.srli");
    vec(16'h840D, i_type(1024 + 3, 8, 5, 8, O_OPI), "c.srai");
    vec(16'h987D, i_type(-1, 8, 7, 8, O_OPI),       "c.andi");
    vec(16'h8C05, sub(8, 8, 9),            "c.sub");
    vec(16'h8C25, r_type(0, 9, 8, 4, 8),   "c.xor");
    vec(16'h8C45, r_type(0, 9, 8, 6, 8),   "c.or");
    vec(16'h8C65, r_type(0, 9, 8, 7, 8),   "c.and");
    vec(16'h0512, slli(10, 10, 4),         "c.slli");
    vec(16'h9002, i_type(1, 0, 0, 0, 7'h73), "c.ebreak");
    vec(16'h0000, 32'h0,                   "illegal");
    repeat (500) begin
      automatic u32 w = $urandom | 32'h3;
      in = w;
      #1;
      check(isc == 1'b0 && out == w, "32-bit pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
