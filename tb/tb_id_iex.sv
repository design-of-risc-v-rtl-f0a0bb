// tb_id_iex: drives random values, enable and clear into the id_iex pipeline
// register and checks it against a model register: reset and clear give
// all zeros, enable low holds the old value, otherwise q takes d one clock
// edge later.
module tb_id_iex;
  import riscv_pkg::*;
  logic clk = 0, reset, enable, clear;
  id_ex_t d, q, model;
  int checks = 0, failures = 0;

  id_iex dut (.clk, .reset, .enable, .clear, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic id_ex_t rand_val();
    logic [$bits(id_ex_t)-1:0] v;
    for (int i = 0; i < $bits(id_ex_t); i += 32) v = {v, $urandom};
    return id_ex_t'(v);
  endfunction

  initial begin
    reset = 1; enable = 1; clear = 0; d = rand_val();
    @(posedge clk);
    #1;
    checks++;
    if (q !== '0) failures++;
    reset = 0;
    model = '0;
    repeat (2000) begin
      d = rand_val();
      enable = ($urandom_range(0, 3) != 0);
      clear  = ($urandom_range(0, 7) == 0);
      @(posedge clk);
      if (clear)       model = '0;
      else if (enable) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL en=%0d clr=%0d", enable, clear);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
