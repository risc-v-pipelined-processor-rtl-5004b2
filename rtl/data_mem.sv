// data_mem: data memory of the Memory stage.
//
// BYTES bytes held as 32-bit words. Reads are combinational: the word at addr is
// fetched and the byte, halfword or word selected by mem_op and the low address
// bits is sign- or zero-extended into rdata. Writes happen on the rising clock
// edge when we is high: mem_op SB, SH or SW stores the low byte, halfword or the
// whole of wdata into the addressed lanes. Accesses do not cross a word
// boundary; addresses wrap modulo BYTES. Size and misalignment behaviour are
// this design's own choices.
module data_mem
  import riscv_pkg::*;
#(
  parameter int unsigned BYTES = 4096
) (
  input  logic    clk,
  input  word_t   addr,
  input  word_t   wdata,
  input  logic    we,
  input  mem_op_e mem_op,
  output word_t   rdata
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic [AW-1:0] widx;
  logic [1:0]    off;
  logic [31:0]   word, shifted;
  logic [3:0]    be;
  logic [31:0]   wshift;

  assign widx    = addr[AW+1:2];
  assign off     = addr[1:0];
  assign word    = mem[widx];
  assign shifted = word >> {off, 3'b000};

  always_comb begin
    unique case (mem_op)
      MEM_LB:  rdata = {{24{shifted[7]}}, shifted[7:0]};
      MEM_LBU: rdata = {24'h0, shifted[7:0]};
      MEM_LH:  rdata = {{16{shifted[15]}}, shifted[15:0]};
      MEM_LHU: rdata = {16'h0, shifted[15:0]};
      default: rdata = word;
    endcase
  end

  always_comb begin
    wshift = wdata << {off, 3'b000};
    unique case (mem_op)
      MEM_SB:  be = 4'b0001 << off;
      MEM_SH:  be = 4'b0011 << off;
      MEM_SW:  be = 4'b1111;
      default: be = 4'b0000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[widx][8*i +: 8] <= wshift[8*i +: 8];
    end
  end

endmodule
