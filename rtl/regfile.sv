// regfile: the 32 x 32-bit integer register file read in Decode, written in
// Writeback.
//
// Two combinational read ports (rs1 -> rd1, rs2 -> rd2) and one write port that
// writes wd to register wa on the rising clock edge when we is high. Register x0
// always reads as zero and ignores writes. There is no write-through: a value
// written in the same cycle as it is read reaches Decode through the forwarding
// path from Writeback. A third read port (dbg_idx -> dbg_data) lets a test or a
// debugger observe the registers. The debug port and the register reset (all
// registers cleared by rst_n) are this design's own.
module regfile #(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  output logic [31:0]              rd1,
  output logic [31:0]              rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [31:0]              wd,
  input  logic [$clog2(NREGS)-1:0] dbg_idx,
  output logic [31:0]              dbg_data
);

  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1      = (rs1 == '0)     ? '0 : regs[rs1];
  assign rd2      = (rs2 == '0)     ? '0 : regs[rs2];
  assign dbg_data = (dbg_idx == '0) ? '0 : regs[dbg_idx];

endmodule
