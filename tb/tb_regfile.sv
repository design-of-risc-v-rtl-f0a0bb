// tb_regfile: random reads and writes against a model array. Checks that
// reset clears all registers, x0 reads zero whatever is written to it, a
// written value is read on both ports afterwards, and a read of the
// register being written in the same cycle returns the new value.
module tb_regfile;
  logic        clk = 0, reset, we3;
  logic [4:0]  a1, a2, a3;
  logic [31:0] wd3, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .reset, .we3, .a1, .a2, .a3, .wd3, .rd1, .rd2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_rd(logic [4:0] a);
    if (a == 0) return 0;
    if (we3 && a == a3) return wd3;
    return model[a];
  endfunction

  initial begin
    reset = 1; we3 = 0; a1 = 0; a2 = 0; a3 = 0; wd3 = 0;
    @(posedge clk);
    #1 reset = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      a1 = 5'(i); a2 = 5'(31 - i);
      #1;
      checks++;
      if (rd1 !== 0 || rd2 !== 0) failures++;
    end
    repeat (5000) begin
      we3 = ($urandom_range(0, 2) != 0);
      a3  = 5'($urandom_range(0, 31));
      wd3 = $urandom;
      a1  = $urandom_range(0, 3) == 0 ? a3 : 5'($urandom_range(0, 31));
      a2  = 5'($urandom_range(0, 31));
      #1;
      checks++;
      if (rd1 !== expect_rd(a1) || rd2 !== expect_rd(a2)) begin
        failures++;
        if (failures < 10) $display("FAIL a1=%0d rd1=%h a2=%0d rd2=%h", a1, rd1, a2, rd2);
      end
      @(posedge clk);
      if (we3 && a3 != 0) model[a3] = wd3;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
