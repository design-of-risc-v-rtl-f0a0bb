// tb_top: end-to-end test of the whole processor at its default parameters.
//
// The top loads its default test program (rtl/riscvtest.hex) into the
// instruction memory. The same file is loaded into the reference model,
// which runs it to the final branch-to-self at label done. The processor
// runs from reset; every instruction reaching writeback is compared in
// order with the model (PC, instruction, register write), every store on
// the data-memory port with the model's stores, and at the end data-memory
// words 96, 100, 104 and 108 with the values the program is written to
// leave (7, 25, untouched, 0x12345). The first instruction, fetched in the
// first cycle after reset, must be in writeback in the fifth. Each pipeline
// mechanism is counted
// (forwarding from memory and writeback stage, load-use stall, flush on a
// taken branch, jal, jalr) and one that never happens is a failure.
module tb_top;
  import rv_iss_pkg::*;

  logic        clk = 0, reset;
  logic [31:0] WriteDataM, DataAdrM;
  logic        MemWriteM;

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd_mem = 0, n_fwd_wb = 0, n_flush_br = 0, n_jal = 0, n_jalr = 0;
  int cycle = 0;

  top dut (.clk, .reset, .WriteDataM, .DataAdrM, .MemWriteM);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!reset) begin
    cycle++;
    if (dut.u_riscv_pip_27.StallD) n_stall++;
    if (dut.u_riscv_pip_27.ForwardAE == riscv_pkg::FWD_MEM ||
        dut.u_riscv_pip_27.ForwardBE == riscv_pkg::FWD_MEM) n_fwd_mem++;
    if (dut.u_riscv_pip_27.ForwardAE == riscv_pkg::FWD_WB ||
        dut.u_riscv_pip_27.ForwardBE == riscv_pkg::FWD_WB) n_fwd_wb++;
    if (dut.u_riscv_pip_27.u_datapath_unit.BranchTakenE) n_flush_br++;
  end

  rv_iss       iss;
  retire_t     exp_q[$], st_q[$];
  logic [31:0] prog [1024];

  initial begin
    retire_t r;
    int      guard, first_wb;
    iss = new();
    foreach (prog[i]) prog[i] = '0;
    $readmemh("rtl/riscvtest.hex", prog);
    iss.im = prog;
    guard = 0;
    // run the model until the branch-to-self at 'done' has been executed once
    while (guard < 1000) begin
      r = iss.step();
      exp_q.push_back(r);
      if (r.wr_mem) st_q.push_back(r);
      if (r.instr[6:0] == 7'b1101111) n_jal++;
      if (r.instr[6:0] == 7'b1100111) n_jalr++;
      guard++;
      if (iss.pc == r.pc) break;
    end
    check(guard < 1000, "reference model did not reach the final loop");

    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    first_wb = -1;
    while (exp_q.size() > 0 && cycle < 500) begin
      @(posedge clk);
      #1;
      if (MemWriteM) begin
        r = st_q.pop_front();
        check(DataAdrM == r.mem_addr && WriteDataM == r.mem_val,
              $sformatf("store: mem[%0d] <= %h, expected mem[%0d] <= %h", DataAdrM, WriteDataM, r.mem_addr, r.mem_val));
      end
      if (dut.u_riscv_pip_27.u_datapath_unit.mQ.instr != 0) begin
        if (first_wb < 0) first_wb = cycle;
        r = exp_q.pop_front();
        check(dut.u_riscv_pip_27.u_datapath_unit.mQ.pc == r.pc && dut.u_riscv_pip_27.u_datapath_unit.mQ.instr == r.instr,
              $sformatf("retired pc %h, expected %h", dut.u_riscv_pip_27.u_datapath_unit.mQ.pc, r.pc));
        if (r.wr_reg)
          check(dut.u_riscv_pip_27.RegWriteW && dut.u_riscv_pip_27.RdW == r.rd &&
                dut.u_riscv_pip_27.u_datapath_unit.ResultW == r.rd_val,
                $sformatf("pc %h: x%0d <= %h", r.pc, r.rd, r.rd_val));
      end
    end
    check(exp_q.size() == 0, "program did not complete");
    check(st_q.size() == 0, "missing stores");
    // fetched in the first cycle after reset, in writeback in the fifth: four edges later
    check(first_wb == 4, $sformatf("first writeback after %0d edges, expected 4", first_wb));
    check(dut.u_dmem.mem[24] == 32'd7,       "word at address 96");
    check(dut.u_dmem.mem[25] == 32'd25,      "word at address 100");
    check(dut.u_dmem.mem[26] == 32'd0,       "word at address 104 (label wrong reached)");
    check(dut.u_dmem.mem[27] == 32'h12345,   "word at address 108");
    $display("program done after %0d cycles", cycle);
    $display("mechanisms: load-use stalls=%0d forward-from-M=%0d forward-from-W=%0d taken-branch flushes=%0d jal=%0d jalr=%0d",
             n_stall, n_fwd_mem, n_fwd_wb, n_flush_br, n_jal, n_jalr);
    check(n_stall > 0, "no load-use stall");
    check(n_fwd_mem > 0, "no forward from M");
    check(n_fwd_wb > 0, "no forward from W");
    check(n_flush_br > 0, "no taken branch");
    check(n_jal > 0, "no jal");
    check(n_jalr > 0, "no jalr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
