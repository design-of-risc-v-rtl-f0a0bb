// tb_dmem: random word stores and loads against a model array. A store is
// visible on the read port after the next rising edge, not before; the
// memory starts at zero; the low two address bits are ignored.
module tb_dmem;
  logic        clk = 0, we;
  logic [31:0] a, wd, rd;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  dmem dut (.clk, .we, .a, .wd, .rd);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    we = 0; a = 0; wd = 0;
    repeat (5000) begin
      we = ($urandom_range(0, 1) == 1);
      a  = {20'(0), 10'($urandom_range(0, 63)), 2'($urandom)};
      wd = $urandom;
      #1;
      checks++;
      if (rd !== model[a[11:2]]) begin
        failures++;
        if (failures < 10) $display("FAIL read %h: %h expected %h", a, rd, model[a[11:2]]);
      end
      @(posedge clk);
      if (we) model[a[11:2]] = wd;
      #1;
      checks++;
      if (rd !== model[a[11:2]]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
