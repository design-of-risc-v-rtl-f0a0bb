// tb_extend: encodes random immediates into I, S, B, J and U instruction
// words with the testbench encoders and checks that the extender recovers
// each immediate (sign-extended, B/J with bit 0 zero, U in bits 31:12).
module tb_extend;
  import riscv_pkg::*;
  import rv_iss_pkg::*;
  logic [31:0] instr, imm_ext;
  imm_src_t    imm_src;
  int checks = 0, failures = 0;

  extend dut (.instr (instr[31:7]), .imm_src, .imm_ext);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(string k, logic [31:0] in, imm_src_t s, logic [31:0] e);
    instr = in; imm_src = s;
    #1;
    checks++;
    if (imm_ext !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: instr %h got %h expected %h", k, in, imm_ext, e);
    end
  endtask

  initial begin
    repeat (2000) begin
      int v;
      v = $urandom_range(0, 4095) - 2048;
      try("I", enc_i(v, $urandom_range(0, 31), $urandom_range(0, 7), $urandom_range(0, 31), 7'h13), IMM_I, 32'(v));
      v = $urandom_range(0, 4095) - 2048;
      try("S", enc_s(v, $urandom_range(0, 31), $urandom_range(0, 31)), IMM_S, 32'(v));
      v = 2 * ($urandom_range(0, 4095) - 2048);
      try("B", enc_b(v, $urandom_range(0, 31), $urandom_range(0, 31), 0), IMM_B, 32'(v));
      v = 2 * ($urandom_range(0, 1048575) - 524288);
      try("J", enc_j(v, $urandom_range(0, 31)), IMM_J, 32'(v));
      v = $urandom_range(0, 1048575);
      try("U", enc_u(v, $urandom_range(0, 31)), IMM_U, 32'(v) << 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
