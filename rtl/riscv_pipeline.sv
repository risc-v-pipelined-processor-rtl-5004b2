// riscv_pipeline: 5-stage in-order RV32I processor (with RV32C expansion).
//
// Stages and what each does:
//   IF  - the PC addresses the instruction memory; a 16-bit instruction is
//         expanded by the compressed decoder; PC+4 (PC+2) is computed.
//   ID  - decode, control word, immediate, register file read. Operands are
//         taken from the forwarding network when an older instruction in EX,
//         MEM or WB is about to write the register (bypass into Decode).
//   EX  - ALU (operand 1: rs1 or PC, operand 2: rs2 or immediate), branch
//         condition. (do_br AND taken) OR do_jmp redirects the PC to the ALU
//         result.
//   MEM - data memory read or write at the ALU result.
//   WB  - register write of ALU result, loaded data or PC+4.
// Hazards: a load followed by a user of its result stalls IF/ID one cycle and
// puts a bubble into EX; a taken branch or a jump (fetch predicts not taken)
// replaces the two younger instructions in ID and EX by bubbles. All other
// read-after-write dependences are resolved by forwarding with no penalty.
// Each instruction takes 5 cycles; one can complete per cycle.
//
// Interface: clk, synchronous active-low rst_n (PC = RESET_PC, pipeline empty,
// registers zero). The program is written into the instruction memory through
// imem_we/imem_waddr/imem_wdata (one 32-bit word per cycle, normally while
// rst_n is low). dbg_reg_idx/dbg_reg_data read a register. retire pulses for
// each instruction leaving WB (retire_pc is its PC); stall and flush show the
// load/use and mispredict conditions of the current cycle.
// The stage split, the stall/bubble control and the forwarding follow the
// design; sizes, reset, program loading and debug outputs are this design's own.
module riscv_pipeline
  import riscv_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 4096,
  parameter int unsigned DMEM_BYTES = 4096,
  parameter logic [31:0] RESET_PC   = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic [4:0]  dbg_reg_idx,
  output logic [31:0] dbg_reg_data,
  output logic        retire,
  output logic [31:0] retire_pc,
  output logic        stall,
  output logic        flush
);

  pipe_mode_e mode_if, mode_id, mode_ex, mode_mem, mode_wb;
  logic       load_use, ex_redirect;
  word_t      ex_target;

  // ------------------------------------------------------------------ IF
  word_t pc, pc_seq, raw_instr, if_instr;
  logic  if_is_c;
  ifid_t if_out, id_in;

  fetch_pc #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n,
    .en            (mode_if != PIPE_STALL),
    .is_compressed (if_is_c),
    .redirect      (ex_redirect),
    .target        (ex_target),
    .pc, .pc_next_seq(pc_seq)
  );

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .addr(pc), .instr(raw_instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  compressed_decoder u_cdec (
    .instr_in(raw_instr), .instr_out(if_instr), .is_compressed(if_is_c)
  );

  assign if_out = '{valid: 1'b1, pc: pc, pc4: pc_seq, instr: if_instr};

  pipe_reg #(.T(ifid_t)) u_ifid (
    .clk, .rst_n, .mode(mode_id), .d(if_out), .bubble_val(ifid_t'('0)), .q(id_in)
  );

  // ------------------------------------------------------------------ ID
  op_e      id_op;
  reg_idx_t id_rs1, id_rs2, id_rd;
  ctrl_t    id_ctl;
  word_t    id_imm, rf_rd1, rf_rd2, id_r1, id_r2;
  fwd_sel_e fwd1, fwd2;
  idex_t    id_out, ex_in;
  exmem_t   ex_out, mem_in;
  memwb_t   mem_out, wb_in;
  word_t    ex_fwd_val, mem_fwd_val, wb_val;
  logic     ex_we, mem_we, wb_we;

  decoder u_dec (.instr(id_in.instr), .op(id_op), .rs1(id_rs1), .rs2(id_rs2), .rd(id_rd));
  control u_ctl (.op(id_op), .ctl(id_ctl));
  imm_gen u_imm (.instr(id_in.instr), .op(id_op), .imm(id_imm));

  regfile u_rf (
    .clk, .rst_n,
    .rs1(id_rs1), .rs2(id_rs2), .rd1(rf_rd1), .rd2(rf_rd2),
    .we(wb_we), .wa(wb_in.rd), .wd(wb_val),
    .dbg_idx(dbg_reg_idx), .dbg_data(dbg_reg_data)
  );

  assign ex_we  = ex_in.ctl.reg_do_write;
  assign mem_we = mem_in.ctl.reg_do_write;
  assign wb_we  = wb_in.ctl.reg_do_write;

  forwarding_unit u_fwd (
    .rs1(id_rs1), .rs2(id_rs2),
    .ex_we, .ex_rd(ex_in.rd), .mem_we, .mem_rd(mem_in.rd), .wb_we, .wb_rd(wb_in.rd),
    .fwd1, .fwd2
  );

  function automatic word_t fwd_mux(fwd_sel_e sel, word_t rf, word_t exv, word_t memv, word_t wbv);
    unique case (sel)
      FWD_EX:  return exv;
      FWD_MEM: return memv;
      FWD_WB:  return wbv;
      default: return rf;
    endcase
  endfunction

  assign id_r1 = fwd_mux(fwd1, rf_rd1, ex_fwd_val, mem_fwd_val, wb_val);
  assign id_r2 = fwd_mux(fwd2, rf_rd2, ex_fwd_val, mem_fwd_val, wb_val);

  assign id_out = '{valid: id_in.valid, ctl: id_ctl, pc: id_in.pc, pc4: id_in.pc4,
                    r1: id_r1, r2: id_r2, imm: id_imm, rd: id_rd};

  pipe_reg #(.T(idex_t)) u_idex (
    .clk, .rst_n, .mode(mode_ex), .d(id_out),
    .bubble_val('{valid: 1'b0, ctl: CTRL_NOP, default: '0}), .q(ex_in)
  );

  // ------------------------------------------------------------------ EX
  word_t alu_a, alu_b, alures;
  logic  br_taken;

  assign alu_a = (ex_in.ctl.alu_op1_ctl == OP1_PC)  ? ex_in.pc  : ex_in.r1;
  assign alu_b = (ex_in.ctl.alu_op2_ctl == OP2_IMM) ? ex_in.imm : ex_in.r2;

  alu u_alu (.ctl(ex_in.ctl.alu_ctl), .a(alu_a), .b(alu_b), .res(alures));

  branch_unit u_br (.br_op(ex_in.ctl.br_op), .a(ex_in.r1), .b(ex_in.r2), .taken(br_taken));

  assign ex_redirect = (ex_in.ctl.do_br && br_taken) || ex_in.ctl.do_jmp;
  assign ex_target   = alures;
  // A load in EX has no value yet; the hazard unit stalls before it is needed.
  assign ex_fwd_val  = wb_value(ex_in.ctl.reg_wr_src_ctl, alures, alures, ex_in.pc4);

  hazard_unit u_haz (
    .ex_is_load(ex_in.ctl.mem_do_read), .ex_rd(ex_in.rd),
    .id_rs1, .id_rs2, .ex_redirect, .load_use,
    .mode_if, .mode_id, .mode_ex, .mode_mem, .mode_wb
  );

  assign ex_out = '{valid: ex_in.valid, ctl: ex_in.ctl, pc: ex_in.pc, pc4: ex_in.pc4,
                    alures: alures, r2: ex_in.r2, rd: ex_in.rd};

  pipe_reg #(.T(exmem_t)) u_exmem (
    .clk, .rst_n, .mode(mode_mem), .d(ex_out),
    .bubble_val('{valid: 1'b0, ctl: CTRL_NOP, default: '0}), .q(mem_in)
  );

  // ------------------------------------------------------------------ MEM
  word_t mem_rdata;

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(mem_in.alures), .wdata(mem_in.r2),
    .we(mem_in.ctl.mem_do_write), .mem_op(mem_in.ctl.mem_op), .rdata(mem_rdata)
  );

  assign mem_fwd_val = wb_value(mem_in.ctl.reg_wr_src_ctl, mem_in.alures, mem_rdata, mem_in.pc4);

  assign mem_out = '{valid: mem_in.valid, ctl: mem_in.ctl, pc: mem_in.pc, pc4: mem_in.pc4,
                     alures: mem_in.alures, memres: mem_rdata, rd: mem_in.rd};

  pipe_reg #(.T(memwb_t)) u_memwb (
    .clk, .rst_n, .mode(mode_wb), .d(mem_out),
    .bubble_val('{valid: 1'b0, ctl: CTRL_NOP, default: '0}), .q(wb_in)
  );

  // ------------------------------------------------------------------ WB
  assign wb_val = wb_value(wb_in.ctl.reg_wr_src_ctl, wb_in.alures, wb_in.memres, wb_in.pc4);

  assign retire    = wb_in.valid;
  assign retire_pc = wb_in.pc;
  assign stall     = load_use && !ex_redirect;
  assign flush     = ex_redirect;

  // A stall and a flush are never requested for the same register together.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(load_use && ex_redirect))
      else $error("riscv_pipeline: load/use and redirect in the same cycle");
  end

endmodule
