// control_unit: decode-stage control of the pipeline.
//
// Joins the main decoder (opcode -> control signals and ALUOp) and the ALU
// decoder (ALUOp, funct3, funct7 bit 5, opcode bit 5 -> ALU operation) and
// packs the result into one ctrl_t word: RegWriteD, ResultSrcD, MemWriteD,
// JumpD, BranchD, ALUControlD, ALUSrcAD, ALUSrcBD, PCJalSrcD. ImmSrcD goes
// to the extender in the same stage. Combinational: the word is registered
// by the ID/IEx pipeline register. The split into these two decoders follows
// the original design.
module control_unit
  import riscv_pkg::*;
(
  input  logic [6:0] op,
  input  logic [2:0] funct3,
  input  logic       funct7b5,
  output ctrl_t      ctrl,
  output imm_src_t   imm_src
);

  alu_op_t alu_op;

  maindec u_maindec (
    .op         (op),
    .reg_write  (ctrl.reg_write),
    .result_src (ctrl.result_src),
    .mem_write  (ctrl.mem_write),
    .branch     (ctrl.branch),
    .jump       (ctrl.jump),
    .alu_op     (alu_op),
    .alu_src_a  (ctrl.alu_src_a),
    .alu_src_b  (ctrl.alu_src_b),
    .imm_src    (imm_src),
    .pc_jal_src (ctrl.pc_jal_src)
  );

  aludec u_aludec (
    .alu_op      (alu_op),
    .funct3      (funct3),
    .funct7b5    (funct7b5),
    .opb5        (op[5]),
    .alu_control (ctrl.alu_control)
  );

endmodule
