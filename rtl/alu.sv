// alu: the execute-stage arithmetic logic unit of the RV32I pipeline.
//
// Computes result = a OP b for the operation named by alu_control (see
// riscv_pkg::alu_ctrl_t): ADD, SUB, AND, OR, XOR, shift left and shift right
// (logical) as in the base instruction table, SLT, and the MUL and DIV codes
// that the original ALU test also names. Purely combinational.
//   zero : result is all zeros (used by beq/bne)
//   sign : a is less than b as signed numbers, taken from a - b with the
//          overflow corrected (used by blt/bge as SignE)
// Shifts use b[4:0]. DIV is signed and, as in RV32M, returns all ones when
// b is zero and a when the quotient overflows; those corner cases and the
// codes of SLT, SLL and SRL are this design's own choices.
module alu
  import riscv_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctrl_t        alu_control,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             sign
);

  logic [WIDTH-1:0] diff;
  logic             lt;
  logic [WIDTH-1:0] quot;

  assign diff = a - b;
  // Signed less-than: when the signs differ the answer is a's sign bit,
  // otherwise the subtraction cannot overflow and its sign bit is the answer.
  assign lt   = (a[WIDTH-1] != b[WIDTH-1]) ? a[WIDTH-1] : diff[WIDTH-1];

  always_comb begin
    if (b == '0)
      quot = '1;
    else if (a == {1'b1, {(WIDTH-1){1'b0}}} && b == '1)
      quot = a;
    else
      quot = WIDTH'($signed(a) / $signed(b));
  end

  always_comb begin
    unique case (alu_control)
      ALU_ADD: result = a + b;
      ALU_SUB: result = diff;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_XOR: result = a ^ b;
      ALU_MUL: result = a * b;
      ALU_DIV: result = quot;
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, lt};
      ALU_SLL: result = a << b[4:0];
      ALU_SRL: result = a >> b[4:0];
      default: result = a + b;
    endcase
  end

  assign zero = (result == '0);
  assign sign = lt;

endmodule
