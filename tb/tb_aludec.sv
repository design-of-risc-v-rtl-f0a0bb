// tb_aludec: exhaustive test of the ALU decoder over all 2*8*2*2 inputs of
// ALUOp 00/01/10 against a table written out here.
module tb_aludec;
  import riscv_pkg::*;
  alu_op_t    alu_op;
  logic [2:0] funct3;
  logic       funct7b5, opb5;
  alu_ctrl_t  alu_control;
  int checks = 0, failures = 0;

  aludec dut (.alu_op, .funct3, .funct7b5, .opb5, .alu_control);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic alu_ctrl_t expect_of(logic [1:0] aop, logic [2:0] f3, logic f7, logic o5);
    if (aop == 2'b00) return ALU_ADD;
    if (aop == 2'b01) return ALU_SUB;
    case (f3)
      3'd0: return (f7 && o5) ? ALU_SUB : ALU_ADD;   // sub only for R-type
      3'd1: return ALU_SLL;
      3'd2: return ALU_SLT;
      3'd4: return ALU_XOR;
      3'd5: return ALU_SRL;
      3'd6: return ALU_OR;
      3'd7: return ALU_AND;
      default: return ALU_ADD;
    endcase
  endfunction

  initial begin
    for (int aop = 0; aop < 3; aop++)
      for (int f = 0; f < 8; f++)
        for (int s = 0; s < 4; s++) begin
          alu_op = alu_op_t'(aop); funct3 = 3'(f); funct7b5 = s[1]; opb5 = s[0];
          #1;
          checks++;
          if (alu_control !== expect_of(2'(aop), 3'(f), s[1], s[0])) begin
            failures++;
            $display("FAIL aluop %0d f3 %0d f7b5 %0d opb5 %0d -> %0d", aop, f, s[1], s[0], alu_control);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
