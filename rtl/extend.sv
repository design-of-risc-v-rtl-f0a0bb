// extend: immediate generator of the decode stage.
//
// Builds the sign-extended 32-bit immediate ImmExtD from instr[31:7] in the
// format chosen by ImmSrcD: I (loads, arithmetic, jalr), S (stores),
// B (branches, byte offset with bit 0 zero), J (jal) and U (lui, upper 20
// bits). Combinational. The original design only names this block; the
// formats are those of the RV32I base encoding.
module extend
  import riscv_pkg::*;
(
  input  logic [31:7] instr,
  input  imm_src_t    imm_src,
  output logic [31:0] imm_ext
);

  always_comb begin
    unique case (imm_src)
      IMM_I:   imm_ext = {{20{instr[31]}}, instr[31:20]};
      IMM_S:   imm_ext = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   imm_ext = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_J:   imm_ext = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
      IMM_U:   imm_ext = {instr[31:12], 12'b0};
      default: imm_ext = '0;
    endcase
  end

endmodule
