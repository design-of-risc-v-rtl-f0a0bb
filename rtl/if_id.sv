// if_id: the IF/ID pipeline register, between the fetch and decode stages.
//
// Holds instruction, PC and PC+4 of the fetched instruction. In the core enable
// is the inverse of StallD (load-use stall) and clear is FlushD (taken branch
// or jump).
// On the rising clock edge the register loads d when enable is high; clear
// (synchronous, with priority over enable) and reset load all zeros, which
// the decoders treat as a bubble that writes nothing. The held fields follow
// the original design; the zero-bubble clear is this design's choice.
module if_id
  import riscv_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   enable,
  input  logic   clear,
  input  if_id_t d,
  output if_id_t q
);

  always_ff @(posedge clk) begin
    if (reset || clear) q <= '0;
    else if (enable)    q <= d;
  end

endmodule
