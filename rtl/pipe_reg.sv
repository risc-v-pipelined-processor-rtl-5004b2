// pipe_reg: a pipeline register between two stages of the processor.
//
// Each clock edge it acts in one of the three modes set by the hazard unit:
//   PIPE_NORMAL - load the next payload d (the instruction moves on),
//   PIPE_STALL  - keep the current payload (the instruction is held),
//   PIPE_BUBBLE - load bubble_val, a no-operation (the instruction is cancelled).
// The three modes are the ones the design is built on; the payload type T and
// the synchronous active-low reset, which loads the bubble value, are this
// design's own. q is the registered payload, valid one cycle after the edge.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  riscv_pkg::pipe_mode_e mode,
  input  T                      d,
  input  T                      bubble_val,
  output T                      q
);
  import riscv_pkg::*;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= bubble_val;
    end else begin
      unique case (mode)
        PIPE_NORMAL: q <= d;
        PIPE_BUBBLE: q <= bubble_val;
        default:     q <= q;  // PIPE_STALL
      endcase
    end
  end

endmodule
