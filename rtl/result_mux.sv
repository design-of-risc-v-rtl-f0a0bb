// result_mux: writeback data select.
//
// mem_to_wb (ResultSrcW) 00 selects the ALU result, 01 the word read from
// data memory (loads), 10 wb_result, which the core drives with PC+4 for
// jal/jalr link values. The three inputs and the 2-bit select follow the
// original design; 11 selecting the ALU result is this design's choice.
// Combinational; write_data goes to the register file write port (ResultW).
module result_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] alu_result,
  input  logic [WIDTH-1:0] mem_result,
  input  logic [WIDTH-1:0] wb_result,
  input  logic [1:0]       mem_to_wb,
  output logic [WIDTH-1:0] write_data
);

  always_comb begin
    unique case (mem_to_wb)
      2'b01:   write_data = mem_result;
      2'b10:   write_data = wb_result;
      default: write_data = alu_result;
    endcase
  end

endmodule
