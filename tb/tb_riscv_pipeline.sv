// tb_riscv_pipeline: end-to-end test of the 5-stage pipeline at its default sizes.
//
// Programs are assembled in the testbench, written into the instruction memory
// through the load port while reset is held, and run until the final
// self-loop instruction retires. Four parts:
//   1. directed RV32I code with the dependence, load/use and taken-branch
//      patterns the pipeline is built around;
//   2. a mixed 16/32-bit program (compressed instructions) checked against
//      hand-worked register values and retire order;
//   3. random RV32I programs (ALU, loads/stores of all widths, branches, jal,
//      jalr) with dense register reuse;
//   4. a loop workload (array fill, sum and bubble sort) whose CPI is reported.
// For 32-bit programs the reference model rv_iss steps once per retiring
// instruction: retire_pc must follow the model's PC, and the registers and the
// data memory must match at the end. The cycle count is checked exactly:
// the last instruction is in WB 3 + I + S + 2*(F-1) edges after reset, with I
// instructions, S load/use stalls and F redirects before it (5-cycle latency,
// 1 stall cycle, 2 flushed slots). Every mechanism (load/use stall, taken
// branch, jump, forwarding from EX, MEM and WB, compressed fetch) must occur.
module tb_riscv_pipeline;
  import rv_asm_pkg::*;
  import riscv_pkg::*;

  localparam int unsigned DMEM_BYTES = 4096;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [31:0] imem_waddr = '0, imem_wdata = '0;
  logic [4:0]  dbg_reg_idx = '0;
  logic [31:0] dbg_reg_data;
  logic        retire, stall, flush;
  logic [31:0] retire_pc;

  riscv_pipeline dut (
    .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata, .dbg_reg_idx, .dbg_reg_data,
    .retire, .retire_pc, .stall, .flush
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_br_taken = 0, n_jump = 0, n_fwd_ex = 0, n_fwd_mem = 0, n_fwd_wb = 0, n_cfetch = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, sampled every cycle the core runs.
  always @(negedge clk) begin
    if (rst_n) begin
      if (stall) n_stall++;
      if (dut.ex_in.ctl.do_br && dut.br_taken) n_br_taken++;
      if (dut.ex_in.ctl.do_jmp) n_jump++;
      if (dut.mode_ex == PIPE_NORMAL && dut.id_in.valid) begin
        if (dut.fwd1 == FWD_EX  || dut.fwd2 == FWD_EX)  n_fwd_ex++;
        if (dut.fwd1 == FWD_MEM || dut.fwd2 == FWD_MEM) n_fwd_mem++;
        if (dut.fwd1 == FWD_WB  || dut.fwd2 == FWD_WB)  n_fwd_wb++;
      end
      if (dut.if_is_c && dut.mode_id == PIPE_NORMAL) n_cfetch++;
    end
  end

  // Watchdog.
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  u32 prog[$];

  task automatic load_program();
    rst_n = 1'b0;
    @(negedge clk);
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = 32'(i * 4); imem_wdata = prog[i];
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin  // padding after the program
      imem_we = 1'b1; imem_waddr = 32'((prog.size() + i) * 4); imem_wdata = nop();
      @(negedge clk);
    end
    imem_we = 1'b0;
    for (int i = 0; i < DMEM_BYTES / 4; i++) dut.u_dmem.mem[i] = '0;
    @(negedge clk);
  endtask

  function automatic u32 read_reg(int r);
    return (r == 0) ? '0 : dut.u_rf.regs[r];
  endfunction

  // Runs the loaded program until end_pc retires. With use_iss the model steps
  // in lockstep and registers/memory are compared at the end.
  int first_retire;

  task automatic run(u32 end_pc, bit use_iss, string name, output int cycles, output int instrs);
    rv_iss iss = new(DMEM_BYTES);
    int s0, f0, cyc = 0, ins = 0, pc_mismatch = 0;
    bit done = 0;
    foreach (prog[i]) iss.im[32'(i * 4)] = prog[i];
    @(negedge clk);
    rst_n = 1'b1;
    s0 = n_stall; f0 = n_br_taken + n_jump;
    first_retire = 0;
    while (!done && cyc < 200_000) begin
      @(negedge clk);
      cyc++;
      if (retire) begin
        ins++;
        if (ins == 1) first_retire = cyc;
        if (use_iss) begin
          if (retire_pc != iss.pc) pc_mismatch++;
          iss.step();
        end
        if (retire_pc == end_pc) done = 1;
      end
    end
    check(done, $sformatf("%s: end reached", name));
    check(pc_mismatch == 0, $sformatf("%s: retire order (%0d mismatches)", name, pc_mismatch));
    begin
      int s = n_stall - s0, f = n_br_taken + n_jump - f0;
      // The final jump's own redirect does not delay it.
      check(cyc == 3 + ins + s + 2 * (f - 1),
            $sformatf("%s: cycles %0d vs 3+I(%0d)+S(%0d)+2(F-1)(%0d)", name, cyc, ins, s, f - 1));
    end
    if (use_iss) begin
      int bad = 0;
      for (int r = 1; r < 32; r++) begin
        dbg_reg_idx = 5'(r);
        #1;
        if (dbg_reg_data != iss.x[r]) begin
          bad++;
          if (bad < 4) $display("  %s: x%0d = %h, model %h", name, r, dbg_reg_data, iss.x[r]);
        end
      end
      check(bad == 0, $sformatf("%s: registers", name));
      bad = 0;
      for (int a = 0; a < 256; a++) begin
        logic [31:0] w = dut.u_dmem.mem[a];
        for (int k = 0; k < 4; k++)
          if (w[8*k +: 8] != iss.rdb(32'(4 * a + k))) bad++;
      end
      check(bad == 0, $sformatf("%s: data memory (%0d bytes differ)", name, bad));
    end
    cycles = cyc;
    instrs = ins;
    rst_n = 1'b0;
  endtask

  // ---------------------------------------------------------------- random
  function automatic void gen_random(int n);
    int i = 0;
    prog.delete();
    while (i < n) begin
      int k = $urandom_range(0, 99);
      int rd = $urandom_range(0, 8), rs1 = $urandom_range(0, 8), rs2 = $urandom_range(0, 8);
      if (k < 30) begin
        int f3 = $urandom_range(0, 7);
        int f7 = ((f3 == 0 || f3 == 5) && $urandom_range(0, 1) == 1) ? 32 : 0;
        prog.push_back(r_type(f7, rs2, rs1, f3, rd));
      end else if (k < 50) begin
        int f3 = $urandom_range(0, 7);
        int imm = $urandom_range(0, 4095);
        if (f3 == 1) imm = $urandom_range(0, 31);
        if (f3 == 5) imm = $urandom_range(0, 31) + ($urandom_range(0, 1) == 1 ? 1024 : 0);
        prog.push_back(i_type(imm, rs1, f3, rd, O_OPI));
      end else if (k < 53) begin
        prog.push_back($urandom_range(0, 1) == 1 ? lui(rd, $urandom) : auipc(rd, $urandom_range(0, 15)));
      end else if (k < 68) begin
        int f3s[5] = '{0, 1, 2, 4, 5};
        int f3 = f3s[$urandom_range(0, 4)];
        int off = (f3 == 2) ? 4 * $urandom_range(0, 63) : (f3 == 1 || f3 == 5) ? 2 * $urandom_range(0, 127)
                                                        : $urandom_range(0, 255);
        prog.push_back(i_type(off, 0, f3, rd, O_LD));
      end else if (k < 80) begin
        int f3 = $urandom_range(0, 2);
        int off = (f3 == 2) ? 4 * $urandom_range(0, 63) : (f3 == 1) ? 2 * $urandom_range(0, 127)
                                                        : $urandom_range(0, 255);
        prog.push_back(s_type(off, rs2, 0, f3));
      end else if (k < 92) begin
        int f3s[6] = '{0, 1, 4, 5, 6, 7};
        int skip = $urandom_range(1, 3);
        if (i + skip > n) skip = n - i;
        prog.push_back(b_type(4 * skip, rs2, rs1, f3s[$urandom_range(0, 5)]));
      end else if (k < 96) begin
        int skip = $urandom_range(1, 3);
        if (i + skip > n) skip = n - i;
        prog.push_back(jal(rd, 4 * skip));
      end else if (i + 2 <= n) begin
        // jalr with base x0: an absolute, forward target.
        prog.push_back(jalr(rd, 0, 4 * (i + $urandom_range(1, 2))));
      end else begin
        prog.push_back(nop());
      end
      i++;
    end
    prog.push_back(jal(0, 0));
  endfunction

  initial begin
    int cyc, ins;
    u32 endpc;

    // ------------------------------------------------ 1. directed RV32I
    prog = '{addi(1, 0, 50),      // x1 = 50
             addi(3, 0, 8),       // x3 = 8
             add (2, 1, 3),       // reads x1 (MEM) and x3 (EX)
             sw  (2, 0, 64),      // reads x2 (EX)
             lw  (4, 2, 6),       // reads x2 (MEM): x4 = mem[64] = 58
             add (5, 4, 1),       // load/use: stall, then x4 from MEM
             lw  (6, 0, 64),
             nop(),
             add (7, 6, 6),       // x6 from WB... via MEM after one nop
             beq (1, 1, 12),      // taken: next two cancelled
             addi(8, 0, 1),       // cancelled
             addi(9, 0, 2),       // cancelled
             addi(10, 0, 3),
             jal (11, 8),         // x11 = return address, skip one
             addi(12, 0, 99),     // cancelled
             jal (0, 0)};
    load_program();
    endpc = 32'(4 * (prog.size() - 1));
    run(endpc, 1'b1, "directed", cyc, ins);
    // Fetched in cycle 1 (up to the 1st edge), in WB in cycle 5 (after the 4th).
    check(first_retire == 4, $sformatf("first instruction in WB after %0d edges, expect 4", first_retire));
    check(read_reg(4) == 58 && read_reg(5) == 108 && read_reg(7) == 116, "directed: forwarded values");
    check(read_reg(8) == 0 && read_reg(9) == 0 && read_reg(10) == 3, "directed: branch shadow cancelled");
    check(read_reg(11) == 56 && read_reg(12) == 0, "directed: jal link and shadow");

    // ------------------------------------------------ 2. compressed code
    prog = '{32'h448D_4415,  // 00 c.li x8,5      02 c.li x9,3
             32'hC422_9426,  // 04 c.add x8,x9    06 c.swsp x8,8(sp)
             32'h0505_4522,  // 08 c.lwsp x10,8   0A c.addi x10,1 (load/use)
             32'h0640_0593,  // 0C addi x11,x0,100 (32-bit)
             32'hE099_862A,  // 10 c.mv x12,x10   12 c.bnez x9,+6
             32'h46A1_469D,  // 14 c.li x13,7     16 c.li x13,8    (skipped)
             32'h4705_2019,  // 18 c.jal +6       1A c.li x14,1
             32'h4789_A019,  // 1C c.j +6         1E c.li x15,2
             32'h0001_A001,  // 20 c.jr x1 -> 1A  22 c.j 0
             32'h0001_0001};
    prog[8] = 32'hA001_8082;
    load_program();
    run(32'h22, 1'b0, "compressed", cyc, ins);
    check(read_reg(8) == 8 && read_reg(9) == 3 && read_reg(10) == 9 && read_reg(11) == 100,
          "compressed: ALU, load/use and 32-bit mix");
    check(read_reg(12) == 9 && read_reg(13) == 0 && read_reg(14) == 1 && read_reg(15) == 2,
          "compressed: branch, c.jal, c.jr");
    check(read_reg(1) == 32'h1A && dut.u_dmem.mem[2] == 32'd8, "compressed: link register and store");
    check(ins == 15, $sformatf("compressed: %0d instructions retired, expect 15", ins));

    // ------------------------------------------------ 3. random programs
    for (int t = 0; t < 40; t++) begin
      gen_random(200);
      load_program();
      run(32'(4 * (prog.size() - 1)), 1'b1, $sformatf("random%0d", t), cyc, ins);
    end

    // ------------------------------------------------ 4. loop workload
    // x1 = N; fill a[i] = (i * 37) & 255 at 0..; sum; bubble sort; checksum.
    prog = '{addi(1, 0, 32),                     // 0  N
             addi(2, 0, 0),                      // 4  i = 0
             addi(3, 0, 0),                      // 8  v = 0
             sw  (3, 2, 0),                      // 12 loop1: a[i] = v   (x2 is byte offset)
             addi(3, 3, 37),                     // 16
             i_type(255, 3, 7, 3, O_OPI),        // 20 andi x3,x3,255
             addi(2, 2, 4),                      // 24
             slli(4, 1, 2),                      // 28 x4 = 4N
             blt (2, 4, -20),                    // 32 -> 12
             addi(2, 0, 0),                      // 36 i = 0
             addi(5, 0, 0),                      // 40 sum = 0
             lw  (6, 2, 0),                      // 44 loop2
             add (5, 5, 6),                      // 48 load/use
             addi(2, 2, 4),                      // 52
             blt (2, 4, -12),                    // 56 -> 44
             addi(7, 4, -4),                     // 60 outer: end = 4N-4
             addi(2, 0, 0),                      // 64 j = 0
             lw  (8, 2, 0),                      // 68 inner
             lw  (9, 2, 4),                      // 72
             blt (8, 9, 12),                     // 76 in order? -> 88 (load/use)
             sw  (9, 2, 0),                      // 80 swap
             sw  (8, 2, 4),                      // 84
             addi(2, 2, 4),                      // 88
             blt (2, 7, -24),                    // 92 -> 68
             addi(4, 4, -4),                     // 96
             addi(10, 0, 4),                     // 100
             blt (10, 4, -44),                   // 104 -> 60
             jal (0, 0)};                        // 108
    load_program();
    run(32'd108, 1'b1, "workload", cyc, ins);
    $display("workload: %0d instructions, %0d cycles after fill, CPI = %0.3f",
             ins, cyc - 3, real'(cyc - 3) / real'(ins));
    begin
      int exp_sum;
      exp_sum = 0;
      for (int i = 0; i < 32; i++) exp_sum += (37 * i) % 256;
      check(dut.u_rf.regs[5] == 32'(exp_sum), $sformatf("workload: sum = %0d, expect %0d", dut.u_rf.regs[5], exp_sum));
    end

    // ------------------------------------------------ mechanisms seen
    $display("mechanisms: load/use stalls %0d, taken branches %0d, jumps %0d, fwd EX %0d MEM %0d WB %0d, compressed fetches %0d",
             n_stall, n_br_taken, n_jump, n_fwd_ex, n_fwd_mem, n_fwd_wb, n_cfetch);
    check(n_stall > 0, "load/use stall happened");
    check(n_br_taken > 0, "taken branch happened");
    check(n_jump > 0, "jump happened");
    check(n_fwd_ex > 0, "forwarding from EX happened");
    check(n_fwd_mem > 0, "forwarding from MEM happened");
    check(n_fwd_wb > 0, "forwarding from WB happened");
    check(n_cfetch > 0, "compressed instruction fetched");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
