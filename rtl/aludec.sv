// aludec: the ALU decoder of the control unit.
//
// Turns the 2-bit ALUOp from the main decoder, together with funct3,
// funct7 bit 5 and opcode bit 5, into the 4-bit ALU operation. ALUOp 00
// means add (address arithmetic), 01 subtract (branch compare), 10 look at
// funct3. RTypeSub = funct7b5 AND opb5 tells an R-type SUB from ADD, so an
// addi whose immediate has bit 10 set is still an add; that rule follows the
// original design. Combinational.
// Own choices: funct3 011 (sltu) is not supported and decodes as ADD, and
// funct3 101 is always a logical right shift (no arithmetic shift). MUL and
// DIV exist in the ALU but are never selected here.
module aludec
  import riscv_pkg::*;
(
  input  alu_op_t    alu_op,
  input  logic [2:0] funct3,
  input  logic       funct7b5,
  input  logic       opb5,
  output alu_ctrl_t  alu_control
);

  logic rtype_sub;
  assign rtype_sub = funct7b5 & opb5;

  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: alu_control = ALU_ADD;
      ALUOP_SUB: alu_control = ALU_SUB;
      ALUOP_FUNCT: begin
        unique case (funct3)
          3'b000:  alu_control = rtype_sub ? ALU_SUB : ALU_ADD;
          3'b001:  alu_control = ALU_SLL;
          3'b010:  alu_control = ALU_SLT;
          3'b100:  alu_control = ALU_XOR;
          3'b101:  alu_control = ALU_SRL;
          3'b110:  alu_control = ALU_OR;
          3'b111:  alu_control = ALU_AND;
          default: alu_control = ALU_ADD;
        endcase
      end
      default: alu_control = ALU_ADD;
    endcase
  end

endmodule
