// pc_mux: next program counter select of the fetch stage.
//
// pc_sel 00 picks the sequential address pc_next (PC+4), 01 the branch or
// jal target pc_branch (PC+immediate), 10 the jalr target pc_jump; 11 falls
// back to pc_next. This encoding is the original design's. Combinational.
module pc_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [1:0]       pc_sel,
  input  logic [WIDTH-1:0] pc_next,
  input  logic [WIDTH-1:0] pc_branch,
  input  logic [WIDTH-1:0] pc_jump,
  output logic [WIDTH-1:0] pc_out
);

  always_comb begin
    unique case (pc_sel)
      2'b01:   pc_out = pc_branch;
      2'b10:   pc_out = pc_jump;
      default: pc_out = pc_next;
    endcase
  end

endmodule
