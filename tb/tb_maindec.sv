// tb_maindec: checks the main decoder's control signals for every opcode the
// processor decodes, and that every other 7-bit opcode (including all
// zeros, the pipeline bubble, and auipc) writes neither register nor memory
// and neither branches nor jumps.
module tb_maindec;
  import riscv_pkg::*;
  logic [6:0]  op;
  logic        reg_write, mem_write, branch, jump, alu_src_a, alu_src_b, pc_jal_src;
  result_src_t result_src;
  alu_op_t     alu_op;
  imm_src_t    imm_src;
  int checks = 0, failures = 0;

  maindec dut (.op, .reg_write, .result_src, .mem_write, .branch, .jump, .alu_op,
               .alu_src_a, .alu_src_b, .imm_src, .pc_jal_src);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {reg_write, result_src, mem_write, branch, jump, alu_op, alu_src_a, alu_src_b, imm_src, pc_jal_src}
  function automatic logic [14:0] expect_of(logic [6:0] o);
    case (o)
      7'h33: return {1'b1, 2'b00, 1'b0, 1'b0, 1'b0, 2'b10, 1'b0, 1'b0, 3'd0, 1'b0};
      7'h13: return {1'b1, 2'b00, 1'b0, 1'b0, 1'b0, 2'b10, 1'b0, 1'b1, 3'd0, 1'b0};
      7'h03: return {1'b1, 2'b01, 1'b0, 1'b0, 1'b0, 2'b00, 1'b0, 1'b1, 3'd0, 1'b0};
      7'h23: return {1'b0, 2'b00, 1'b1, 1'b0, 1'b0, 2'b00, 1'b0, 1'b1, 3'd1, 1'b0};
      7'h63: return {1'b0, 2'b00, 1'b0, 1'b1, 1'b0, 2'b01, 1'b0, 1'b0, 3'd2, 1'b0};
      7'h6f: return {1'b1, 2'b10, 1'b0, 1'b0, 1'b1, 2'b00, 1'b0, 1'b0, 3'd3, 1'b0};
      7'h67: return {1'b1, 2'b10, 1'b0, 1'b0, 1'b1, 2'b00, 1'b0, 1'b1, 3'd0, 1'b1};
      7'h37: return {1'b1, 2'b00, 1'b0, 1'b0, 1'b0, 2'b00, 1'b1, 1'b1, 3'd4, 1'b0};
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 128; o++) begin
      logic [14:0] got, e;
      op = 7'(o);
      #1;
      got = {reg_write, result_src, mem_write, branch, jump, alu_op, alu_src_a, alu_src_b, imm_src, pc_jal_src};
      e = expect_of(7'(o));
      checks++;
      if (e == '0) begin
        if (reg_write || mem_write || branch || jump) begin
          failures++;
          $display("FAIL opcode %h should do nothing", o);
        end
      end else if (got !== e) begin
        failures++;
        $display("FAIL opcode %h: got %b expected %b", o, got, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
