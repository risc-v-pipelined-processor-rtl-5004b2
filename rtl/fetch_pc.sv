// fetch_pc: program counter of the Fetch stage with its next-PC logic.
//
// The PC register addresses the instruction memory. Its sequential successor is
// PC + 4, or PC + 2 when the fetched instruction is a 16-bit compressed one
// (the compressed decoder picks the increment). The PC mux loads the branch or
// jump target computed by the ALU in Execute when a taken branch or a jump is
// there (redirect), and the sequential successor otherwise. With en low (a
// load/use stall) the PC holds. pc_next_seq is combinational from pc and is
// carried down the pipe as the return address of jal/jalr.
// The reset value RESET_PC is this design's choice.
module fetch_pc #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        is_compressed,
  input  logic        redirect,
  input  logic [31:0] target,
  output logic [31:0] pc,
  output logic [31:0] pc_next_seq
);

  assign pc_next_seq = pc + (is_compressed ? 32'd2 : 32'd4);

  always_ff @(posedge clk) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (redirect) pc <= target;
    else if (en)       pc <= pc_next_seq;
  end

endmodule
