// hazard_unit: pipeline control; sets the mode of every pipeline register.
//
// Two conditions are detected, combinationally, each cycle:
//   load/use    - the instruction in EX is a load and its destination (not x0)
//                 is rs1 or rs2 of the instruction in ID. Next edge: IF and ID
//                 stall (PC and IF/ID hold), EX gets a bubble; one lost cycle.
//   mispredict  - the instruction in EX is a taken branch or a jump. Fetch always
//                 predicts not taken, so the two younger instructions are wrong:
//                 ID and EX get bubbles while IF loads the target; two lost cycles.
// MEM and WB always run normally: mode_mem and mode_wb are constant NORMAL,
// kept as ports so that every pipeline register takes its mode from this
// unit. mode_if is the PC's mode (STALL = hold).
// The two conditions cannot coincide since EX holds either a load or a
// branch/jump. The two conditions and their per-stage actions are those of the
// design; treating a jump like a taken branch and ignoring loads to x0 are this
// implementation's reading of it.
module hazard_unit
  import riscv_pkg::*;
(
  input  logic       ex_is_load,
  input  reg_idx_t   ex_rd,
  input  reg_idx_t   id_rs1,
  input  reg_idx_t   id_rs2,
  input  logic       ex_redirect,
  output logic       load_use,
  output pipe_mode_e mode_if,
  output pipe_mode_e mode_id,
  output pipe_mode_e mode_ex,
  output pipe_mode_e mode_mem,
  output pipe_mode_e mode_wb
);

  assign load_use = ex_is_load && ex_rd != '0 && (ex_rd == id_rs1 || ex_rd == id_rs2);

  always_comb begin
    mode_if  = PIPE_NORMAL;
    mode_id  = PIPE_NORMAL;
    mode_ex  = PIPE_NORMAL;
    mode_mem = PIPE_NORMAL;
    mode_wb  = PIPE_NORMAL;
    if (ex_redirect) begin
      mode_id = PIPE_BUBBLE;
      mode_ex = PIPE_BUBBLE;
    end else if (load_use) begin
      mode_if = PIPE_STALL;
      mode_id = PIPE_STALL;
      mode_ex = PIPE_BUBBLE;
    end
  end

endmodule
