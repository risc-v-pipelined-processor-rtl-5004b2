// instr_mem: instruction memory of the Fetch stage.
//
// Read combinationally at the PC. It is organised as 16-bit halfwords so that a
// 32-bit instruction can start at any even address, as mixed 16/32-bit
// (compressed) code requires: instr = {hw[addr/2 + 1], hw[addr/2]}. Addresses
// wrap modulo BYTES. A synchronous 32-bit write port (we, waddr, wdata) loads the
// program; waddr is a byte address, word aligned. Size and load port are this
// design's own choices.
module instr_mem #(
  parameter int unsigned BYTES = 4096
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int unsigned HWORDS = BYTES / 2;
  localparam int unsigned AW     = $clog2(HWORDS);

  logic [15:0] mem [HWORDS];

  logic [AW-1:0] lo, hi, wlo, whi;
  assign lo  = addr[AW:1];
  assign hi  = lo + 1'b1;
  assign wlo = {waddr[AW:2], 1'b0};
  assign whi = {waddr[AW:2], 1'b1};

  assign instr = {mem[hi], mem[lo]};

  always_ff @(posedge clk) begin
    if (we) begin
      mem[wlo] <= wdata[15:0];
      mem[whi] <= wdata[31:16];
    end
  end

  initial begin
    assert (BYTES >= 8 && (BYTES & (BYTES - 1)) == 0)
      else $error("instr_mem: BYTES must be a power of two");
  end

endmodule
