// compressed_decoder: expands 16-bit compressed (RV32C) instructions.
//
// Sits between the instruction memory and the IF/ID register. When the two low
// bits of the fetched word are not 2'b11 the low halfword is a compressed
// instruction: it is rewritten into the equivalent 32-bit RV32I instruction and
// is_compressed tells the fetch logic to advance the PC by 2 instead of 4.
// Otherwise the word passes unchanged. Purely combinational.
// The block and its 1-bit output to the PC increment mux come from the datapath
// drawing; the expansion table is the standard RV32C one (integer subset, no
// floating-point loads/stores). Reserved or illegal encodings expand to 32'h0,
// which the decoder treats as an invalid instruction and executes as a no-op.
module compressed_decoder (
  input  logic [31:0] instr_in,
  output logic [31:0] instr_out,
  output logic        is_compressed
);

  localparam logic [6:0] OPC_LUI = 7'b0110111, OPC_JAL = 7'b1101111, OPC_JALR = 7'b1100111,
                         OPC_BR  = 7'b1100011, OPC_LD  = 7'b0000011, OPC_ST   = 7'b0100011,
                         OPC_OPI = 7'b0010011, OPC_OP  = 7'b0110011, OPC_SYS  = 7'b1110011;

  function automatic logic [31:0] enc_i(logic [11:0] imm, logic [4:0] rs1, logic [2:0] f3,
                                        logic [4:0] rd, logic [6:0] opc);
    return {imm, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] enc_s(logic [11:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [6:0] opc);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], opc};
  endfunction
  function automatic logic [31:0] enc_b(logic [12:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], OPC_BR};
  endfunction
  function automatic logic [31:0] enc_j(logic [20:0] imm, logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, OPC_JAL};
  endfunction
  function automatic logic [31:0] enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, OPC_OP};
  endfunction

  logic [15:0] c;
  logic [4:0]  rd, rs2, rdp, rs1p, rs2p;
  logic [11:0] imm6;     // sign-extended {c[12], c[6:2]}
  logic [20:0] jimm;
  logic [12:0] bimm;

  assign c    = instr_in[15:0];
  assign rd   = c[11:7];
  assign rs2  = c[6:2];
  assign rdp  = {2'b01, c[4:2]};
  assign rs1p = {2'b01, c[9:7]};
  assign rs2p = {2'b01, c[4:2]};
  assign imm6 = {{6{c[12]}}, c[12], c[6:2]};
  assign jimm = {{10{c[12]}}, c[8], c[10:9], c[6], c[7], c[2], c[11], c[5:3], 1'b0};
  assign bimm = {{5{c[12]}}, c[6:5], c[2], c[11:10], c[4:3], 1'b0};

  assign is_compressed = (instr_in[1:0] != 2'b11);

  always_comb begin
    instr_out = 32'h0;
    if (!is_compressed) begin
      instr_out = instr_in;
    end else begin
      unique case ({c[1:0], c[15:13]})
        // ---- quadrant 0
        5'b00_000: if (c[12:5] != 8'h0)  // c.addi4spn
                     instr_out = enc_i({2'b00, c[10:7], c[12:11], c[5], c[6], 2'b00},
                                       5'd2, 3'b000, rdp, OPC_OPI);
        5'b00_010: instr_out = enc_i({5'b0, c[5], c[12:10], c[6], 2'b00}, rs1p, 3'b010, rdp, OPC_LD);  // c.lw
        5'b00_110: instr_out = enc_s({5'b0, c[5], c[12:10], c[6], 2'b00}, rs2p, rs1p, 3'b010, OPC_ST); // c.sw
        // ---- quadrant 1
        5'b01_000: instr_out = enc_i(imm6, rd, 3'b000, rd, OPC_OPI);      // c.addi / c.nop
        5'b01_001: instr_out = enc_j(jimm, 5'd1);                         // c.jal
        5'b01_010: instr_out = enc_i(imm6, 5'd0, 3'b000, rd, OPC_OPI);    // c.li
        5'b01_011: begin
          if (rd == 5'd2) begin                                           // c.addi16sp
            if ({c[12], c[6:2]} != 6'h0)
              instr_out = enc_i({{3{c[12]}}, c[4:3], c[5], c[2], c[6], 4'b0000},
                                5'd2, 3'b000, 5'd2, OPC_OPI);
          end else if ({c[12], c[6:2]} != 6'h0) begin                     // c.lui
            instr_out = {{15{c[12]}}, c[6:2], rd, OPC_LUI};
          end
        end
        5'b01_100: begin
          unique case (c[11:10])
            2'b00: if (!c[12]) instr_out = enc_i({7'b0000000, c[6:2]}, rs1p, 3'b101, rs1p, OPC_OPI); // c.srli
            2'b01: if (!c[12]) instr_out = enc_i({7'b0100000, c[6:2]}, rs1p, 3'b101, rs1p, OPC_OPI); // c.srai
            2'b10: instr_out = enc_i(imm6, rs1p, 3'b111, rs1p, OPC_OPI);                            // c.andi
            default: if (!c[12]) begin
              unique case (c[6:5])
                2'b00: instr_out = enc_r(7'b0100000, rs2p, rs1p, 3'b000, rs1p);  // c.sub
                2'b01: instr_out = enc_r(7'b0000000, rs2p, rs1p, 3'b100, rs1p);  // c.xor
                2'b10: instr_out = enc_r(7'b0000000, rs2p, rs1p, 3'b110, rs1p);  // c.or
                default: instr_out = enc_r(7'b0000000, rs2p, rs1p, 3'b111, rs1p); // c.and
              endcase
            end
          endcase
        end
        5'b01_101: instr_out = enc_j(jimm, 5'd0);                         // c.j
        5'b01_110: instr_out = enc_b(bimm, 5'd0, rs1p, 3'b000);           // c.beqz
        5'b01_111: instr_out = enc_b(bimm, 5'd0, rs1p, 3'b001);           // c.bnez
        // ---- quadrant 2
        5'b10_000: if (!c[12]) instr_out = enc_i({7'b0000000, c[6:2]}, rd, 3'b001, rd, OPC_OPI); // c.slli
        5'b10_010: if (rd != 5'd0)                                        // c.lwsp
                     instr_out = enc_i({4'b0, c[3:2], c[12], c[6:4], 2'b00}, 5'd2, 3'b010, rd, OPC_LD);
        5'b10_100: begin
          if (!c[12]) begin
            if (rs2 == 5'd0) begin
              if (rd != 5'd0) instr_out = enc_i(12'h0, rd, 3'b000, 5'd0, OPC_JALR);  // c.jr
            end else begin
              instr_out = enc_r(7'b0, rs2, 5'd0, 3'b000, rd);                       // c.mv
            end
          end else begin
            if (rs2 == 5'd0) begin
              if (rd == 5'd0) instr_out = enc_i(12'h1, 5'd0, 3'b000, 5'd0, OPC_SYS); // c.ebreak
              else            instr_out = enc_i(12'h0, rd, 3'b000, 5'd1, OPC_JALR);  // c.jalr
            end else begin
              instr_out = enc_r(7'b0, rs2, rd, 3'b000, rd);                          // c.add
            end
          end
        end
        5'b10_110: instr_out = enc_s({4'b0, c[8:7], c[12:9], 2'b00}, rs2, 5'd2, 3'b010, OPC_ST); // c.swsp
        default: instr_out = 32'h0;
      endcase
    end
  end

endmodule
