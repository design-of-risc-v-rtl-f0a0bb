// imem_iw: the IMem/IW pipeline register, between the memory and writeback
// stages.
//
// Holds RegWrite, ResultSrc, the ALU result, the loaded word, rd, PC+4, PC and
// the instruction. In the core enable is tied high and clear low.
// On the rising clock edge the register loads d when enable is high; clear
// (synchronous, with priority over enable) and reset load all zeros, which
// the decoders treat as a bubble that writes nothing. The held fields follow
// the original design; the zero-bubble clear is this design's choice.
module imem_iw
  import riscv_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   enable,
  input  logic   clear,
  input  mem_wb_t d,
  output mem_wb_t q
);

  always_ff @(posedge clk) begin
    if (reset || clear) q <= '0;
    else if (enable)    q <= d;
  end

endmodule
