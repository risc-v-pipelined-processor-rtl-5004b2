// rv_asm_pkg: test helpers for the RV32I pipeline testbenches.
//
// Encoders that assemble RV32I instructions into 32-bit words (so that test
// programs can be written in the testbench), and rv_iss, a small
// instruction-at-a-time reference model of RV32I used to predict register and
// memory contents and the order in which instructions retire. The model is
// written from the RISC-V base ISA, independently of the RTL.
package rv_asm_pkg;

  typedef logic [31:0] u32;

  localparam logic [6:0] O_LUI = 7'h37, O_AUIPC = 7'h17, O_JAL = 7'h6f, O_JALR = 7'h67,
                         O_BR = 7'h63, O_LD = 7'h03, O_ST = 7'h23, O_OPI = 7'h13, O_OP = 7'h33;

  function automatic u32 r_type(int f7, int rs2, int rs1, int f3, int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), O_OP};
  endfunction
  function automatic u32 i_type(int imm, int rs1, int f3, int rd, logic [6:0] opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), opc};
  endfunction
  function automatic u32 s_type(int imm, int rs2, int rs1, int f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], O_ST};
  endfunction
  function automatic u32 b_type(int imm, int rs2, int rs1, int f3);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:1], i[11], O_BR};
  endfunction
  function automatic u32 u_type(int imm20, int rd, logic [6:0] opc);
    return {20'(imm20), 5'(rd), opc};
  endfunction
  function automatic u32 j_type(int imm, int rd);
    logic [20:0] i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), O_JAL};
  endfunction

  function automatic u32 addi(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, O_OPI); endfunction
  function automatic u32 add (int rd, int rs1, int rs2); return r_type(0, rs2, rs1, 0, rd);      endfunction
  function automatic u32 sub (int rd, int rs1, int rs2); return r_type(32, rs2, rs1, 0, rd);     endfunction
  function automatic u32 lw  (int rd, int rs1, int imm); return i_type(imm, rs1, 2, rd, O_LD);   endfunction
  function automatic u32 sw  (int rs2, int rs1, int imm); return s_type(imm, rs2, rs1, 2);       endfunction
  function automatic u32 beq (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 0);       endfunction
  function automatic u32 bne (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 1);       endfunction
  function automatic u32 blt (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 4);       endfunction
  function automatic u32 jal (int rd, int off);          return j_type(off, rd);                 endfunction
  function automatic u32 jalr(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, O_JALR); endfunction
  function automatic u32 lui (int rd, int imm20);        return u_type(imm20, rd, O_LUI);        endfunction
  function automatic u32 auipc(int rd, int imm20);       return u_type(imm20, rd, O_AUIPC);      endfunction
  function automatic u32 slli(int rd, int rs1, int sh);  return i_type(sh, rs1, 1, rd, O_OPI);   endfunction
  function automatic u32 nop();                          return addi(0, 0, 0);                   endfunction

  // Reference model: executes 32-bit RV32I instructions one at a time.
  class rv_iss;
    u32          x[32];
    u32          pc;
    logic [7:0]  dm[int unsigned];
    u32          im[int unsigned];
    int unsigned dmask;

    function new(int unsigned dmem_bytes);
      foreach (x[i]) x[i] = '0;
      pc    = '0;
      dmask = dmem_bytes - 1;
    endfunction

    function automatic logic [7:0] rdb(u32 a);
      int unsigned k = a & dmask;
      return dm.exists(k) ? dm[k] : 8'h00;
    endfunction
    function automatic void wrb(u32 a, logic [7:0] v);
      dm[a & dmask] = v;
    endfunction

    function automatic void step();
      u32 in = im[pc];
      logic [6:0] opc = in[6:0];
      int rd = int'(in[11:7]), rs1 = int'(in[19:15]), rs2 = int'(in[24:20]);
      logic [2:0] f3 = in[14:12];
      logic [6:0] f7 = in[31:25];
      u32 a = x[rs1], b = x[rs2];
      u32 ii = {{20{in[31]}}, in[31:20]};
      u32 is = {{20{in[31]}}, in[31:25], in[11:7]};
      u32 ib = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
      u32 iu = {in[31:12], 12'h0};
      u32 ij = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
      u32 npc = pc + 4;
      u32 res = '0;
      bit wr = 0;
      u32 ea;
      case (opc)
        O_LUI:   begin res = iu; wr = 1; end
        O_AUIPC: begin res = pc + iu; wr = 1; end
        O_JAL:   begin res = pc + 4; wr = 1; npc = pc + ij; end
        O_JALR:  begin res = pc + 4; wr = 1; npc = (a + ii) & ~32'h1; end
        O_BR: begin
          bit t;
          case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            default: t = (a >= b);
          endcase
          if (t) npc = pc + ib;
        end
        O_LD: begin
          logic [7:0] b0, b1, b2, b3;
          ea = a + ii; wr = 1;
          b0 = rdb(ea); b1 = rdb(ea + 1); b2 = rdb(ea + 2); b3 = rdb(ea + 3);
          case (f3)
            3'd0: res = {{24{b0[7]}}, b0};
            3'd1: res = {{16{b1[7]}}, b1, b0};
            3'd4: res = {24'h0, b0};
            3'd5: res = {16'h0, b1, b0};
            default: res = {b3, b2, b1, b0};
          endcase
        end
        O_ST: begin
          ea = a + is;
          wrb(ea, b[7:0]);
          if (f3 >= 1) wrb(ea + 1, b[15:8]);
          if (f3 == 2) begin wrb(ea + 2, b[23:16]); wrb(ea + 3, b[31:24]); end
        end
        O_OPI, O_OP: begin
          u32 bb = (opc == O_OP) ? b : ii;
          wr = 1;
          case (f3)
            3'd0: res = (opc == O_OP && f7[5]) ? a - bb : a + bb;
            3'd1: res = a << bb[4:0];
            3'd2: res = ($signed(a) < $signed(bb)) ? 1 : 0;
            3'd3: res = (a < bb) ? 1 : 0;
            3'd4: res = a ^ bb;
            3'd5: res = f7[5] ? u32'($signed(a) >>> bb[4:0]) : a >> bb[4:0];
            3'd6: res = a | bb;
            default: res = a & bb;
          endcase
        end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = res;
      pc = npc;
    endfunction
  endclass

endpackage
