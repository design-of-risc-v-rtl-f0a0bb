// maindec: the main decoder of the control unit.
//
// From the 7-bit opcode (instr[6:0]) it produces the decode-stage control
// signals: RegWrite, ResultSrc, MemWrite, Branch, Jump and ALUOp as the
// original design lists them, plus the selects its pipeline diagram adds:
// ALUSrcA (rs1 or zero), ALUSrcB (rs2 or immediate), ImmSrc (immediate
// format) and PCJalSrc (jal target PC+imm, or jalr target from the ALU).
// Combinational. Decoded opcodes: R-type, I-type arithmetic, lw, sw,
// branches, jal, jalr, lui. Any other opcode, including the all-zero word
// that a flushed or reset pipeline register holds, writes nothing; auipc is
// such an opcode because the datapath has no PC input to the ALU. The
// opcode set and the 2-bit ALUOp are this design's reading of the original.
module maindec
  import riscv_pkg::*;
(
  input  logic [6:0]  op,
  output logic        reg_write,
  output result_src_t result_src,
  output logic        mem_write,
  output logic        branch,
  output logic        jump,
  output alu_op_t     alu_op,
  output logic        alu_src_a,
  output logic        alu_src_b,
  output imm_src_t    imm_src,
  output logic        pc_jal_src
);

  always_comb begin
    reg_write  = 1'b0;
    result_src = RES_ALU;
    mem_write  = 1'b0;
    branch     = 1'b0;
    jump       = 1'b0;
    alu_op     = ALUOP_ADD;
    alu_src_a  = 1'b0;
    alu_src_b  = 1'b0;
    imm_src    = IMM_I;
    pc_jal_src = 1'b0;
    unique case (op)
      OP_REG: begin
        reg_write = 1'b1;
        alu_op    = ALUOP_FUNCT;
      end
      OP_IMM: begin
        reg_write = 1'b1;
        alu_op    = ALUOP_FUNCT;
        alu_src_b = 1'b1;
      end
      OP_LOAD: begin
        reg_write  = 1'b1;
        result_src = RES_MEM;
        alu_src_b  = 1'b1;
      end
      OP_STORE: begin
        mem_write = 1'b1;
        alu_src_b = 1'b1;
        imm_src   = IMM_S;
      end
      OP_BRANCH: begin
        branch  = 1'b1;
        alu_op  = ALUOP_SUB;
        imm_src = IMM_B;
      end
      OP_JAL: begin
        reg_write  = 1'b1;
        result_src = RES_PC4;
        jump       = 1'b1;
        imm_src    = IMM_J;
      end
      OP_JALR: begin
        reg_write  = 1'b1;
        result_src = RES_PC4;
        jump       = 1'b1;
        alu_src_b  = 1'b1;
        pc_jal_src = 1'b1;
      end
      OP_LUI: begin
        reg_write = 1'b1;
        alu_src_a = 1'b1;
        alu_src_b = 1'b1;
        imm_src   = IMM_U;
      end
      default: ;
    endcase
  end

endmodule
