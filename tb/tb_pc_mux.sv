// tb_pc_mux: replays the select sequence of the original PC-mux test
// (pc_sel 1, 0, 2, 3 with pc_next 0x13, pc_branch 0x21, pc_jump 0x29) and
// then random inputs for all four select values.
module tb_pc_mux;
  logic [1:0]  pc_sel;
  logic [31:0] pc_next, pc_branch, pc_jump, pc_out;
  int checks = 0, failures = 0;

  pc_mux dut (.pc_sel, .pc_next, .pc_branch, .pc_jump, .pc_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [1:0] s, logic [31:0] e);
    pc_sel = s;
    #1;
    checks++;
    if (pc_out !== e) begin
      failures++;
      $display("FAIL sel %0d: %h expected %h", s, pc_out, e);
    end
  endtask

  initial begin
    pc_next = 32'h13; pc_branch = 32'h21; pc_jump = 32'h29;
    try(2'd1, 32'h21);
    try(2'd0, 32'h13);
    try(2'd2, 32'h29);
    try(2'd3, 32'h13);
    repeat (1000) begin
      pc_next = $urandom; pc_branch = $urandom; pc_jump = $urandom;
      for (int s = 0; s < 4; s++)
        try(2'(s), s == 1 ? pc_branch : s == 2 ? pc_jump : pc_next);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
