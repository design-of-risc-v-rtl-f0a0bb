// tb_datapath_unit: runs a directed program through the datapath with the
// control unit as its decoder and the hazard inputs driven by this
// testbench instead of the hazard unit. Every instruction is followed by
// three no-ops, so no forwarding is needed; the testbench flushes decode
// and execute on PCSrcE and, at random cycles, inserts a one-cycle bubble
// (StallF, StallD and FlushE together). The register writes seen at the
// write port, in order, must equal those of the reference model, and the
// data memory must end with the stored word. The program covers every
// instruction kind: arithmetic, lw, sw, lui, a branch not taken, a branch
// taken, jal and jalr.
module tb_datapath_unit;
  import riscv_pkg::*;
  import rv_iss_pkg::*;

  logic        clk = 0, reset;
  logic [31:0] PCF, InstrF, InstrD, ALUResultM, WriteDataM, ReadDataM;
  ctrl_t       ctrlD;
  imm_src_t    ImmSrcD;
  logic        StallF, StallD, FlushD, FlushE, PCSrcE, ResultSrcE0, RegWriteM, RegWriteW, MemWriteM;
  fwd_t        ForwardAE, ForwardBE;
  logic [4:0]  Rs1D, Rs2D, Rs1E, Rs2E, RdE, RdM, RdW;
  logic [31:0] im [1024];
  logic [31:0] dm [1024];
  logic        bubble;
  int checks = 0, failures = 0, n_bubbles = 0;

  datapath_unit dut (.*);
  control_unit u_ctl (.op (InstrD[6:0]), .funct3 (InstrD[14:12]), .funct7b5 (InstrD[30]),
                      .ctrl (ctrlD), .imm_src (ImmSrcD));

  assign InstrF    = im[PCF[11:2]];
  assign ReadDataM = dm[ALUResultM[11:2]];
  always_ff @(posedge clk) if (MemWriteM) dm[ALUResultM[11:2]] <= WriteDataM;

  assign ForwardAE = FWD_RF;
  assign ForwardBE = FWD_RF;
  assign StallF    = bubble && !PCSrcE;
  assign StallD    = bubble && !PCSrcE;
  assign FlushD    = PCSrcE;
  assign FlushE    = PCSrcE || (bubble && !PCSrcE);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // instruction k sits at byte address 16*k, followed by three no-ops
  task automatic put(int k, logic [31:0] w);
    im[4 * k] = w;
  endtask

  rv_iss   iss;
  retire_t exp_q[$];

  initial begin
    foreach (im[i]) im[i] = 32'h00000013;   // addi x0, x0, 0
    foreach (dm[i]) dm[i] = '0;
    put(0,  enc_i(5, 0, 0, 1, 7'h13));        // addi x1, x0, 5
    put(1,  enc_i(7, 1, 0, 2, 7'h13));        // addi x2, x1, 7
    put(2,  enc_s(8, 2, 0));                  // sw   x2, 8(x0)
    put(3,  enc_i(8, 0, 2, 3, 7'h03));        // lw   x3, 8(x0)
    put(4,  enc_r(0, 2, 3, 0, 4));            // add  x4, x3, x2
    put(5,  enc_r(32, 4, 1, 0, 5));           // sub  x5, x1, x4
    put(6,  enc_r(0, 1, 5, 2, 6));            // slt  x6, x5, x1
    put(7,  enc_u(20'habcde, 7));             // lui  x7, 0xabcde
    put(8,  enc_b(32, 0, 6, 0));              // beq  x6, x0, +32 (not taken)
    put(9,  enc_b(32, 0, 6, 1));              // bne  x6, x0, +32 (taken)
    put(10, enc_i(99, 0, 0, 1, 7'h13));       // skipped
    put(11, enc_j(32, 8));                    // jal  x8, +32
    put(12, enc_i(98, 0, 0, 1, 7'h13));       // skipped
    put(13, enc_i(16 * 15, 0, 0, 9, 7'h67));  // jalr x9, 240(x0)
    put(14, enc_i(97, 0, 0, 1, 7'h13));       // skipped
    put(15, enc_r(0, 1, 7, 6, 10));           // or   x10, x7, x1
    put(16, enc_b(0, 0, 0, 0));               // beq  x0, x0, 0
    iss = new();
    iss.im = im;
    repeat (200) begin
      retire_t r;
      r = iss.step();
      if (r.wr_reg) exp_q.push_back(r);
    end

    bubble = 0;
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    repeat (400) begin
      @(negedge clk);
      bubble = ($urandom_range(0, 4) == 0);
      n_bubbles += bubble;
      @(posedge clk);
      #1;
      if (RegWriteW && RdW != 0) begin
        retire_t r;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected write x%0d", RdW);
        end else begin
          r = exp_q.pop_front();
          if (RdW !== r.rd || dut.ResultW !== r.rd_val) begin
            failures++;
            $display("FAIL write x%0d <= %h, expected x%0d <= %h", RdW, dut.ResultW, r.rd, r.rd_val);
          end
        end
      end
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d register writes missing", exp_q.size());
    end
    checks++;
    if (dm[2] !== 32'd12) failures++;
    checks++;
    if (n_bubbles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
