// tb_control_unit: feeds whole encoded instructions (op, funct3, funct7 bit
// 5 taken from them) to the control unit and checks the packed control word
// and the immediate format for each instruction kind the processor runs.
module tb_control_unit;
  import riscv_pkg::*;
  import rv_iss_pkg::*;
  logic [31:0] instr;
  ctrl_t       ctrl;
  imm_src_t    imm_src;
  int checks = 0, failures = 0;

  control_unit dut (.op (instr[6:0]), .funct3 (instr[14:12]), .funct7b5 (instr[30]),
                    .ctrl, .imm_src);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctrl(string name, logic [31:0] in, bit rw, result_src_t rs, bit mw,
                             bit j, bit br, alu_ctrl_t ac, bit sa, bit sb, bit pj, imm_src_t is);
    ctrl_t e;
    instr = in;
    #1;
    e = '{reg_write: rw, result_src: rs, mem_write: mw, jump: j, branch: br, alu_control: ac,
          alu_src_a: sa, alu_src_b: sb, pc_jal_src: pj};
    checks++;
    if (ctrl !== e || (imm_src !== is && (sb || br || j || mw))) begin
      failures++;
      $display("FAIL %s: got %p imm %0d", name, ctrl, imm_src);
    end
  endtask

  initial begin
    expect_ctrl("add",  enc_r(0, 3, 2, 0, 1),  1, RES_ALU, 0, 0, 0, ALU_ADD, 0, 0, 0, IMM_I);
    expect_ctrl("sub",  enc_r(32, 3, 2, 0, 1), 1, RES_ALU, 0, 0, 0, ALU_SUB, 0, 0, 0, IMM_I);
    expect_ctrl("and",  enc_r(0, 3, 2, 7, 1),  1, RES_ALU, 0, 0, 0, ALU_AND, 0, 0, 0, IMM_I);
    expect_ctrl("or",   enc_r(0, 3, 2, 6, 1),  1, RES_ALU, 0, 0, 0, ALU_OR,  0, 0, 0, IMM_I);
    expect_ctrl("xor",  enc_r(0, 3, 2, 4, 1),  1, RES_ALU, 0, 0, 0, ALU_XOR, 0, 0, 0, IMM_I);
    expect_ctrl("slt",  enc_r(0, 3, 2, 2, 1),  1, RES_ALU, 0, 0, 0, ALU_SLT, 0, 0, 0, IMM_I);
    expect_ctrl("sll",  enc_r(0, 3, 2, 1, 1),  1, RES_ALU, 0, 0, 0, ALU_SLL, 0, 0, 0, IMM_I);
    expect_ctrl("srl",  enc_r(0, 3, 2, 5, 1),  1, RES_ALU, 0, 0, 0, ALU_SRL, 0, 0, 0, IMM_I);
    expect_ctrl("addi -1024", enc_i(-1024, 2, 0, 1, 7'h13), 1, RES_ALU, 0, 0, 0, ALU_ADD, 0, 1, 0, IMM_I);
    expect_ctrl("ori",  enc_i(5, 2, 6, 1, 7'h13), 1, RES_ALU, 0, 0, 0, ALU_OR,  0, 1, 0, IMM_I);
    expect_ctrl("lw",   enc_i(96, 0, 2, 2, 7'h03), 1, RES_MEM, 0, 0, 0, ALU_ADD, 0, 1, 0, IMM_I);
    expect_ctrl("sw",   32'h0471aa23,           0, RES_ALU, 1, 0, 0, ALU_ADD, 0, 1, 0, IMM_S);
    expect_ctrl("beq",  enc_b(8, 2, 1, 0),      0, RES_ALU, 0, 0, 1, ALU_SUB, 0, 0, 0, IMM_B);
    expect_ctrl("bge",  enc_b(8, 2, 1, 5),      0, RES_ALU, 0, 0, 1, ALU_SUB, 0, 0, 0, IMM_B);
    expect_ctrl("jal",  enc_j(16, 3),           1, RES_PC4, 0, 1, 0, ALU_ADD, 0, 0, 0, IMM_J);
    expect_ctrl("jalr", enc_i(4, 3, 0, 1, 7'h67), 1, RES_PC4, 0, 1, 0, ALU_ADD, 0, 1, 1, IMM_I);
    expect_ctrl("lui",  enc_u(20'h12345, 5),    1, RES_ALU, 0, 0, 0, ALU_ADD, 1, 1, 0, IMM_U);
    expect_ctrl("bubble", 32'h0,                0, RES_ALU, 0, 0, 0, ALU_ADD, 0, 0, 0, IMM_I);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
