// decoder: instruction decoder of the Decode stage.
//
// Identifies which RV32I instruction the 32-bit word is and reports it as the
// internal 6-bit code op_e, which drives the control block and the immediate
// generator, and extracts the register indices rs1, rs2 and rd. Register fields
// an instruction does not use are reported as x0, so that they never match a
// destination in the hazard and forwarding logic; rd is x0 for instructions
// that write no register. Unknown encodings give OP_INVALID (executed as a
// no-op); FENCE, ECALL, EBREAK and CSR instructions give OP_NOP.
// Combinational. The op_e encoding and the no-op treatment are this design's own.
module decoder
  import riscv_pkg::*;
(
  input  word_t    instr,
  output op_e      op,
  output reg_idx_t rs1,
  output reg_idx_t rs2,
  output reg_idx_t rd
);

  logic [6:0] opc, f7;
  logic [2:0] f3;
  logic       use_rs1, use_rs2, use_rd;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];

  always_comb begin
    op      = OP_INVALID;
    use_rs1 = 1'b0;
    use_rs2 = 1'b0;
    use_rd  = 1'b0;
    unique case (opc)
      7'b0110111: begin op = OP_LUI;   use_rd = 1'b1; end
      7'b0010111: begin op = OP_AUIPC; use_rd = 1'b1; end
      7'b1101111: begin op = OP_JAL;   use_rd = 1'b1; end
      7'b1100111: if (f3 == 3'b000) begin op = OP_JALR; use_rs1 = 1'b1; use_rd = 1'b1; end
      7'b1100011: begin
        use_rs1 = 1'b1;
        use_rs2 = 1'b1;
        unique case (f3)
          3'b000: op = OP_BEQ;
          3'b001: op = OP_BNE;
          3'b100: op = OP_BLT;
          3'b101: op = OP_BGE;
          3'b110: op = OP_BLTU;
          3'b111: op = OP_BGEU;
          default: begin op = OP_INVALID; use_rs1 = 1'b0; use_rs2 = 1'b0; end
        endcase
      end
      7'b0000011: begin
        use_rs1 = 1'b1;
        use_rd  = 1'b1;
        unique case (f3)
          3'b000: op = OP_LB;
          3'b001: op = OP_LH;
          3'b010: op = OP_LW;
          3'b100: op = OP_LBU;
          3'b101: op = OP_LHU;
          default: begin op = OP_INVALID; use_rs1 = 1'b0; use_rd = 1'b0; end
        endcase
      end
      7'b0100011: begin
        use_rs1 = 1'b1;
        use_rs2 = 1'b1;
        unique case (f3)
          3'b000: op = OP_SB;
          3'b001: op = OP_SH;
          3'b010: op = OP_SW;
          default: begin op = OP_INVALID; use_rs1 = 1'b0; use_rs2 = 1'b0; end
        endcase
      end
      7'b0010011: begin
        use_rs1 = 1'b1;
        use_rd  = 1'b1;
        unique case (f3)
          3'b000: op = OP_ADDI;
          3'b010: op = OP_SLTI;
          3'b011: op = OP_SLTIU;
          3'b100: op = OP_XORI;
          3'b110: op = OP_ORI;
          3'b111: op = OP_ANDI;
          3'b001: op = (f7 == 7'b0000000) ? OP_SLLI : OP_INVALID;
          default: op = (f7 == 7'b0000000) ? OP_SRLI :
                        (f7 == 7'b0100000) ? OP_SRAI : OP_INVALID;
        endcase
        if (op == OP_INVALID) begin use_rs1 = 1'b0; use_rd = 1'b0; end
      end
      7'b0110011: begin
        use_rs1 = 1'b1;
        use_rs2 = 1'b1;
        use_rd  = 1'b1;
        if (f7 == 7'b0000000) begin
          unique case (f3)
            3'b000: op = OP_ADD;
            3'b001: op = OP_SLL;
            3'b010: op = OP_SLT;
            3'b011: op = OP_SLTU;
            3'b100: op = OP_XOR;
            3'b101: op = OP_SRL;
            3'b110: op = OP_OR;
            default: op = OP_AND;
          endcase
        end else if (f7 == 7'b0100000 && f3 == 3'b000) begin
          op = OP_SUB;
        end else if (f7 == 7'b0100000 && f3 == 3'b101) begin
          op = OP_SRA;
        end else begin
          op = OP_INVALID; use_rs1 = 1'b0; use_rs2 = 1'b0; use_rd = 1'b0;
        end
      end
      7'b0001111, 7'b1110011: op = OP_NOP;  // FENCE / SYSTEM
      default: op = OP_INVALID;
    endcase
  end

  assign rs1 = use_rs1 ? instr[19:15] : 5'd0;
  assign rs2 = use_rs2 ? instr[24:20] : 5'd0;
  assign rd  = use_rd  ? instr[11:7]  : 5'd0;

endmodule
