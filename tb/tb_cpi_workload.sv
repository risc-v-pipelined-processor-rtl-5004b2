// tb_cpi_workload: runs a program with a typical RV32I instruction mix on the
// full-size pipeline and checks its CPI against the bubble model C = I + B.
//
// The program has 1000 instructions, built from shuffled units:
//   250 loads, 50 of them followed at once by an instruction that uses the
//       loaded register (20 % load/use, 1 bubble each);
//   200 branches, 80 of them taken (40 %, 2 bubbles each; a taken branch to
//       the next instruction still costs the full redirect);
//   the rest independent ALU instructions;
// and ends with a self-jump. Every instruction executes, so the mix is exact:
// CPI = 1 + 0.25*0.20*1 + 0.20*0.40*2 = 1.21. The testbench checks the stall
// and redirect counts, that the cycle count equals I + B (plus the 3-edge fill),
// and that the measured CPI is 1.21 to within the single final jump.
module tb_cpi_workload;
  import rv_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [31:0] imem_waddr = '0, imem_wdata = '0;
  logic [31:0] dbg_reg_data, retire_pc;
  logic        retire, stall, flush;

  riscv_pipeline dut (
    .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata, .dbg_reg_idx(5'd0), .dbg_reg_data,
    .retire, .retire_pc, .stall, .flush
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_LU = 50, N_LOAD = 200, N_TAKEN = 80, N_NOTTAKEN = 120, N_ALU = 500;

  u32 prog[$];
  int unit[$];

  initial begin
    automatic int cyc = 0, ins = 0, s = 0, f = 0;
    automatic bit done = 0;
    real cpi;
    // 0: load+use pair, 1: load, 2: taken branch, 3: not-taken branch, 4: ALU
    for (int i = 0; i < N_LU; i++)       unit.push_back(0);
    for (int i = 0; i < N_LOAD; i++)     unit.push_back(1);
    for (int i = 0; i < N_TAKEN; i++)    unit.push_back(2);
    for (int i = 0; i < N_NOTTAKEN; i++) unit.push_back(3);
    for (int i = 0; i < N_ALU; i++)      unit.push_back(4);
    unit.shuffle();
    // Loads write x1..x4 from addresses 0..252; ALU work stays in x10..x15.
    foreach (unit[i]) begin
      automatic int r = $urandom_range(1, 4), a = $urandom_range(10, 15), b = $urandom_range(10, 15);
      case (unit[i])
        0: begin
          prog.push_back(lw(r, 0, 4 * $urandom_range(0, 63)));
          prog.push_back(add(a, r, b));
        end
        1: prog.push_back(lw(r, 0, 4 * $urandom_range(0, 63)));
        2: prog.push_back(beq(0, 0, 4));
        3: prog.push_back(bne(0, 0, 4));
        default: prog.push_back(addi(a, b, $urandom_range(0, 99)));
      endcase
    end
    prog.push_back(jal(0, 0));

    @(negedge clk);
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = 32'(4 * i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    while (!done && cyc < 50_000) begin
      @(negedge clk);
      cyc++;
      if (stall) s++;
      if (flush) f++;
      if (retire) begin
        ins++;
        if (retire_pc == 32'(4 * (prog.size() - 1))) done = 1;
      end
    end
    check(done, "program completed");
    check(ins == prog.size(), $sformatf("%0d instructions retired, expect %0d", ins, prog.size()));
    check(s == N_LU, $sformatf("%0d load/use stalls, expect %0d", s, N_LU));
    check(f - 1 == N_TAKEN, $sformatf("%0d redirects before the final jump, expect %0d", f - 1, N_TAKEN));
    check(cyc == 3 + ins + s + 2 * (f - 1), $sformatf("cycles %0d = fill 3 + I + B", cyc));
    cpi = real'(cyc - 3) / real'(ins);
    $display("workload: I = %0d, load/use bubbles = %0d, branch bubbles = %0d, CPI = %0.4f",
             ins, s, 2 * (f - 1), cpi);
    check(cpi > 1.205 && cpi < 1.215, $sformatf("CPI %0.4f close to 1.21", cpi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
