// forwarding_unit: chooses where each Decode operand comes from.
//
// A result is produced in Execute or Memory but written to the register file
// only in Writeback, so an instruction in Decode that reads a register an older
// instruction will write takes the value from that older instruction instead.
// For each source register (rs1, rs2) the unit compares it with the destination
// of the instructions in EX, MEM and WB and selects the youngest match:
// FWD_EX, then FWD_MEM, then FWD_WB; with no match, or for x0, FWD_RF (the
// register file). A load in EX cannot supply its value yet; the hazard unit
// stalls that case for one cycle, after which the load is in MEM and matches
// there. Combinational.
module forwarding_unit
  import riscv_pkg::*;
(
  input  reg_idx_t rs1,
  input  reg_idx_t rs2,
  input  logic     ex_we,
  input  reg_idx_t ex_rd,
  input  logic     mem_we,
  input  reg_idx_t mem_rd,
  input  logic     wb_we,
  input  reg_idx_t wb_rd,
  output fwd_sel_e fwd1,
  output fwd_sel_e fwd2
);

  function automatic fwd_sel_e pick(reg_idx_t rs);
    if (rs == '0)                     return FWD_RF;
    else if (ex_we  && ex_rd  == rs)  return FWD_EX;
    else if (mem_we && mem_rd == rs)  return FWD_MEM;
    else if (wb_we  && wb_rd  == rs)  return FWD_WB;
    else                              return FWD_RF;
  endfunction

  assign fwd1 = pick(rs1);
  assign fwd2 = pick(rs2);

endmodule
