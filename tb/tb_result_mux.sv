// tb_result_mux: the writeback select returns the ALU result for 00 and 11,
// the memory word for 01 and PC+4 (wb_result) for 10, on random data.
module tb_result_mux;
  logic [31:0] alu_result, mem_result, wb_result, write_data;
  logic [1:0]  mem_to_wb;
  int checks = 0, failures = 0;

  result_mux dut (.alu_result, .mem_result, .wb_result, .mem_to_wb, .write_data);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) begin
      alu_result = $urandom; mem_result = $urandom; wb_result = $urandom;
      for (int s = 0; s < 4; s++) begin
        mem_to_wb = 2'(s);
        #1;
        checks++;
        if (write_data !== (s == 1 ? mem_result : s == 2 ? wb_result : alu_result)) begin
          failures++;
          $display("FAIL sel %0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
