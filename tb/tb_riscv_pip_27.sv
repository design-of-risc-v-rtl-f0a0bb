// tb_riscv_pip_27: random-program test of the pipelined core.
//
// For each of NPROG programs from rv_iss_pkg::gen_program the core runs with
// testbench memories (combinational instruction read, combinational data
// read, data write on the rising edge). Every instruction that reaches the
// writeback stage is checked, in order, against the reference model: its PC,
// its register write (rd and value). At the end the register file and data
// memory are
// compared. Load-use stalls, forwarding from both stages and flushes are
// counted; a mechanism that never occurs is a failure.
module tb_riscv_pip_27;
  import rv_iss_pkg::*;

  localparam int NPROG = 40;
  localparam int NINSTR = 120;

  logic        clk = 0, reset;
  logic [31:0] PCF, InstrF, ALUResultM, WriteDataM, ReadDataM;
  logic        MemWriteM;
  logic [31:0] im [1024];
  logic [31:0] dm [1024];

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd_mem = 0, n_fwd_wb = 0, n_flush = 0, n_jalr = 0, n_load = 0, n_store = 0;

  riscv_pip_27 dut (
    .clk, .reset, .PCF, .InstrF, .MemWriteM, .ALUResultM, .WriteDataM, .ReadDataM
  );

  assign InstrF    = im[PCF[11:2]];
  assign ReadDataM = dm[ALUResultM[11:2]];
  always_ff @(posedge clk) if (MemWriteM) dm[ALUResultM[11:2]] <= WriteDataM;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NPROG * (NINSTR * 4 + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters
  always @(posedge clk) if (!reset) begin
    if (dut.StallD) n_stall++;
    if (dut.ForwardAE == riscv_pkg::FWD_MEM || dut.ForwardBE == riscv_pkg::FWD_MEM) n_fwd_mem++;
    if (dut.ForwardAE == riscv_pkg::FWD_WB  || dut.ForwardBE == riscv_pkg::FWD_WB)  n_fwd_wb++;
    if (dut.FlushD) n_flush++;
  end

  rv_iss iss;
  retire_t exp_q[$];

  initial begin
    for (int p = 0; p < NPROG; p++) begin
      retire_t r;
      int      guard, retired, cyc;
      gen_program(im, NINSTR);
      foreach (dm[i]) dm[i] = 32'(i * 32'h01010101 + p);
      iss = new();
      iss.im = im;
      iss.dm = dm;
      exp_q.delete();
      guard = 0;
      while (iss.pc != 4 * NINSTR && guard < 10000) begin
        r = iss.step();
        exp_q.push_back(r);
        if (r.instr[6:0] == 7'b1100111) n_jalr++;
        if (r.instr[6:0] == 7'b0000011) n_load++;
        if (r.wr_mem) n_store++;
        guard++;
      end
      reset = 1;
      repeat (2) @(posedge clk);
      #1 reset = 0;
      retired = 0;
      cyc = 0;
      while (exp_q.size() > 0 && cyc < NINSTR * 4 + 50) begin
        @(posedge clk);
        #1;
        cyc++;
        if (dut.u_datapath_unit.mQ.instr != 0) begin
          r = exp_q.pop_front();
          retired++;
          check(dut.u_datapath_unit.mQ.pc == r.pc,
                $sformatf("prog %0d: retired pc %h, expected %h", p, dut.u_datapath_unit.mQ.pc, r.pc));
          check(dut.u_datapath_unit.mQ.instr == r.instr, $sformatf("prog %0d: instr at %h", p, r.pc));
          if (r.wr_reg) begin
            check(dut.RegWriteW && dut.RdW == r.rd &&
                  dut.u_datapath_unit.ResultW == r.rd_val,
                  $sformatf("prog %0d pc %h: x%0d <= %h, got we=%0d x%0d <= %h", p, r.pc, r.rd, r.rd_val,
                            dut.RegWriteW, dut.RdW, dut.u_datapath_unit.ResultW));
          end
        end
      end
      check(exp_q.size() == 0, $sformatf("prog %0d: %0d instructions never retired", p, exp_q.size()));
      @(posedge clk);
      #1;
      // final state
      for (int i = 1; i < 32; i++)
        check(dut.u_datapath_unit.u_regfile.rf[i] == iss.x[i], $sformatf("prog %0d: final x%0d", p, i));
      for (int i = 0; i < 1024; i++)
        if (dm[i] != iss.dm[i]) check(0, $sformatf("prog %0d: dmem word %0d", p, i));
      checks++;
    end
    $display("mechanisms: load-use stalls=%0d forward-from-M=%0d forward-from-W=%0d flushes=%0d jalr=%0d loads=%0d stores=%0d",
             n_stall, n_fwd_mem, n_fwd_wb, n_flush, n_jalr, n_load, n_store);
    check(n_stall > 0, "no load-use stall");
    check(n_fwd_mem > 0, "no forward from M");
    check(n_fwd_wb > 0, "no forward from W");
    check(n_flush > 0, "no flush");
    check(n_jalr > 0, "no jalr");
    check(n_store > 0, "no store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
