// tb_imem: loads the default test program and checks words at known byte
// addresses (0x00, 0x04, 0x34 holding the store 0x0471aa23, 0x8c), that the
// two low address bits are ignored, and that words past the program are 0.
module tb_imem;
  logic [31:0] a, rd;
  int checks = 0, failures = 0;

  imem #(.INIT_FILE ("rtl/riscvtest.hex")) dut (.a, .rd);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [31:0] addr, logic [31:0] e);
    a = addr;
    #1;
    checks++;
    if (rd !== e) begin
      failures++;
      $display("FAIL addr %h: %h expected %h", addr, rd, e);
    end
  endtask

  initial begin
    #1;
    try(32'h00, 32'h00500113);
    try(32'h04, 32'h00c00193);
    try(32'h06, 32'h00c00193);
    try(32'h34, 32'h0471aa23);
    try(32'h8c, 32'h00210063);
    try(32'h90, 32'h00000000);
    try(32'hffc, 32'h00000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
