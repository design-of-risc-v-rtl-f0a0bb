// tb_alu: checks every ALU operation on directed corner values and random
// operands against results computed here, including the zero and sign
// (signed less-than) flags and the division corner cases. Also repeats the
// OR example of the original ALU test (0x1 | 0x5 = 0x5).
module tb_alu;
  import riscv_pkg::*;
  logic [31:0] a, b, result;
  alu_ctrl_t   ctl;
  logic        zero, sign;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_control (ctl), .result, .zero, .sign);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_ctrl_t c, logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y));
    case (c)
      ALU_ADD: return 32'((64'(x) + 64'(y)));
      ALU_SUB: return 32'(64'(x) + 64'(~y) + 64'd1);
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_MUL: return 32'(64'(x) * 64'(y));
      ALU_DIV: return (y == 0) ? 32'hffffffff : 32'(sx / sy);
      ALU_SLT: return (sx < sy) ? 1 : 0;
      ALU_SLL: begin logic [31:0] r = x; repeat (y[4:0]) r = {r[30:0], 1'b0}; return r; end
      ALU_SRL: begin logic [31:0] r = x; repeat (y[4:0]) r = {1'b0, r[31:1]}; return r; end
      default: return 'x;
    endcase
  endfunction

  task automatic try(alu_ctrl_t c, logic [31:0] x, logic [31:0] y);
    logic [31:0] e;
    a = x; b = y; ctl = c;
    #1;
    e = model(c, x, y);
    checks++;
    if (result !== e || zero !== (e == 0) ||
        sign !== (longint'($signed(x)) < longint'($signed(y)))) begin
      failures++;
      if (failures < 10) $display("FAIL op %0d a=%h b=%h: got %h z%0d s%0d, expected %h", c, x, y, result, zero, sign, e);
    end
  endtask

  logic [31:0] corner [8] = '{32'h0, 32'h1, 32'hffffffff, 32'h80000000, 32'h7fffffff, 32'h5, 32'h27, 32'h1f};
  alu_ctrl_t ops [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_MUL, ALU_DIV, ALU_XOR, ALU_SLT, ALU_SLL, ALU_SRL};

  initial begin
    foreach (ops[o]) foreach (corner[i]) foreach (corner[j]) try(ops[o], corner[i], corner[j]);
    repeat (20000) try(ops[$urandom_range(0, 9)], $urandom, $urandom);
    // OR example: operands 0x1 and 0x5
    try(ALU_OR, 32'h1, 32'h5);
    checks++;
    if (result != 32'h5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
