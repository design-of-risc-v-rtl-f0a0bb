// tb_hazard_unit: random register numbers and write enables (drawn from a
// small range so that matches are frequent) against a reference written
// here: forwarding priority M over W, no forwarding of x0, a one-cycle
// load-use stall and the flush on a taken branch or jump.
module tb_hazard_unit;
  import riscv_pkg::*;
  logic [4:0] Rs1D, Rs2D, Rs1E, Rs2E, RdE, RdM, RdW;
  logic       PCSrcE, ResultSrcE0, RegWriteM, RegWriteW;
  logic       StallF, StallD, FlushD, FlushE;
  fwd_t       ForwardAE, ForwardBE;
  int checks = 0, failures = 0;
  int n_stall = 0, n_mem = 0, n_wb = 0;

  hazard_unit dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] fw(logic [4:0] rs);
    if (rs != 0 && RegWriteM && rs == RdM) return 2'b10;
    if (rs != 0 && RegWriteW && rs == RdW) return 2'b01;
    return 2'b00;
  endfunction

  initial begin
    repeat (20000) begin
      bit stall;
      {Rs1D, Rs2D, Rs1E, Rs2E} = {5'($urandom_range(0, 3)), 5'($urandom_range(0, 3)),
                                  5'($urandom_range(0, 3)), 5'($urandom_range(0, 3))};
      {RdE, RdM, RdW} = {5'($urandom_range(0, 3)), 5'($urandom_range(0, 3)), 5'($urandom_range(0, 3))};
      {PCSrcE, ResultSrcE0, RegWriteM, RegWriteW} = 4'($urandom);
      #1;
      stall = ResultSrcE0 && RdE != 0 && (Rs1D == RdE || Rs2D == RdE);
      checks++;
      if (ForwardAE !== fw(Rs1E) || ForwardBE !== fw(Rs2E) || StallF !== stall || StallD !== stall ||
          FlushD !== PCSrcE || FlushE !== (stall || PCSrcE)) begin
        failures++;
        if (failures < 10) $display("FAIL");
      end
      n_stall += stall;
      n_mem   += (fw(Rs1E) == 2'b10);
      n_wb    += (fw(Rs1E) == 2'b01);
    end
    checks++;
    if (n_stall == 0 || n_mem == 0 || n_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
