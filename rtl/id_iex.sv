// id_iex: the ID/IEx pipeline register, between the decode and execute stages.
//
// Holds decoded control word, the two register operands, PC, source and
// destination register numbers, the extended immediate, PC+4, funct3 and the
// instruction. In the core enable is tied high and clear is FlushE (load-use
// bubble or taken branch).
// On the rising clock edge the register loads d when enable is high; clear
// (synchronous, with priority over enable) and reset load all zeros, which
// the decoders treat as a bubble that writes nothing. The held fields follow
// the original design; the zero-bubble clear is this design's choice.
module id_iex
  import riscv_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   enable,
  input  logic   clear,
  input  id_ex_t d,
  output id_ex_t q
);

  always_ff @(posedge clk) begin
    if (reset || clear) q <= '0;
    else if (enable)    q <= d;
  end

endmodule
