// datapath_unit: the five-stage datapath (fetch, decode, execute, memory,
// writeback) of the RV32I pipeline.
//
// Fetch: the PC register (held by StallF) addresses the instruction memory;
//   pc_mux picks the next PC from PC+4, the PC-relative target PCTargetE
//   (taken branch, jal) or the ALU result with bit 0 cleared (jalr).
// Decode: IF/ID feeds the register file (read ports) and the extender; the
//   control word ctrlD comes from the control unit outside this module.
// Execute: the forwarding muxes (ForwardAE/BE) pick the newest value of each
//   source; ALUSrcA can replace rs1 by zero (lui) and ALUSrcB rs2 by the
//   immediate. A branch is taken when BranchE and
//   ((funct3[2] ? SignE : ZeroE) xor funct3[0]), i.e. beq, bne, blt, bge.
//   PCSrcE = taken branch or JumpE redirects fetch.
// Memory: ALUResultM addresses the data memory, WriteDataM is the store data.
// Writeback: result_mux picks ALU result, loaded word or PC+4 for the
//   register file write port.
// Each instruction takes five cycles from fetch to writeback; a taken branch
// or jump costs two bubbles and a load followed by a dependent instruction
// one. The stage structure and signal names follow the original pipeline
// diagram; the branch condition gates, the forward-mux input order and the
// reset PC are this design's choices. The PC and instruction word ride along
// to the last pipeline register only so that a simulation can see which
// instruction is retiring; no logic reads them there.
module datapath_unit
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        reset,
  // instruction memory
  output logic [31:0] PCF,
  input  logic [31:0] InstrF,
  // control unit
  output logic [31:0] InstrD,
  input  ctrl_t       ctrlD,
  input  imm_src_t    ImmSrcD,
  // hazard unit
  input  logic        StallF,
  input  logic        StallD,
  input  logic        FlushD,
  input  logic        FlushE,
  input  fwd_t        ForwardAE,
  input  fwd_t        ForwardBE,
  output logic [4:0]  Rs1D,
  output logic [4:0]  Rs2D,
  output logic [4:0]  Rs1E,
  output logic [4:0]  Rs2E,
  output logic [4:0]  RdE,
  output logic        PCSrcE,
  output logic        ResultSrcE0,
  output logic [4:0]  RdM,
  output logic        RegWriteM,
  output logic [4:0]  RdW,
  output logic        RegWriteW,
  // data memory
  output logic        MemWriteM,
  output logic [31:0] ALUResultM,
  output logic [31:0] WriteDataM,
  input  logic [31:0] ReadDataM
);

  // ---------------------------------------------------------------- fetch
  logic [31:0] PCNextF, PCPlus4F;
  logic [1:0]  PCSelE;
  logic [31:0] PCTargetE, PCJumpE;

  always_ff @(posedge clk) begin
    if (reset)        PCF <= RESET_PC;
    else if (!StallF) PCF <= PCNextF;
  end

  assign PCPlus4F = PCF + 32'd4;

  pc_mux u_pc_mux (
    .pc_sel    (PCSelE),
    .pc_next   (PCPlus4F),
    .pc_branch (PCTargetE),
    .pc_jump   (PCJumpE),
    .pc_out    (PCNextF)
  );

  if_id_t fD, fQ;
  assign fD = '{instr: InstrF, pc: PCF, pc_plus4: PCPlus4F};

  if_id u_if_id (
    .clk (clk), .reset (reset), .enable (!StallD), .clear (FlushD),
    .d (fD), .q (fQ)
  );

  // --------------------------------------------------------------- decode
  logic [31:0] RD1D, RD2D, ImmExtD, ResultW;
  logic [4:0]  RdD;

  assign InstrD = fQ.instr;
  assign Rs1D   = InstrD[19:15];
  assign Rs2D   = InstrD[24:20];
  assign RdD    = InstrD[11:7];

  regfile u_regfile (
    .clk (clk), .reset (reset),
    .we3 (RegWriteW), .a1 (Rs1D), .a2 (Rs2D), .a3 (RdW), .wd3 (ResultW),
    .rd1 (RD1D), .rd2 (RD2D)
  );

  extend u_extend (
    .instr (InstrD[31:7]), .imm_src (ImmSrcD), .imm_ext (ImmExtD)
  );

  id_ex_t dD, dQ;
  assign dD = '{ctrl: ctrlD, rd1: RD1D, rd2: RD2D, pc: fQ.pc, rs1: Rs1D, rs2: Rs2D,
                rd: RdD, imm_ext: ImmExtD, pc_plus4: fQ.pc_plus4,
                funct3: InstrD[14:12], instr: InstrD};

  id_iex u_id_iex (
    .clk (clk), .reset (reset), .enable (1'b1), .clear (FlushE),
    .d (dD), .q (dQ)
  );

  // -------------------------------------------------------------- execute
  logic [31:0] FwdAE, WriteDataE, SrcAE, SrcBE, ALUResultE;
  logic        ZeroE, SignE, BranchTakenE;

  assign Rs1E        = dQ.rs1;
  assign Rs2E        = dQ.rs2;
  assign RdE         = dQ.rd;
  assign ResultSrcE0 = dQ.ctrl.result_src[0];

  always_comb begin
    unique case (ForwardAE)
      FWD_WB:  FwdAE = ResultW;
      FWD_MEM: FwdAE = ALUResultM;
      default: FwdAE = dQ.rd1;
    endcase
    unique case (ForwardBE)
      FWD_WB:  WriteDataE = ResultW;
      FWD_MEM: WriteDataE = ALUResultM;
      default: WriteDataE = dQ.rd2;
    endcase
  end

  assign SrcAE = dQ.ctrl.alu_src_a ? 32'd0 : FwdAE;
  assign SrcBE = dQ.ctrl.alu_src_b ? dQ.imm_ext : WriteDataE;

  alu u_alu (
    .a (SrcAE), .b (SrcBE), .alu_control (dQ.ctrl.alu_control),
    .result (ALUResultE), .zero (ZeroE), .sign (SignE)
  );

  assign PCTargetE    = dQ.pc + dQ.imm_ext;
  assign PCJumpE      = {ALUResultE[31:1], 1'b0};
  assign BranchTakenE = dQ.ctrl.branch & ((dQ.funct3[2] ? SignE : ZeroE) ^ dQ.funct3[0]);
  assign PCSrcE       = BranchTakenE | dQ.ctrl.jump;
  assign PCSelE       = (dQ.ctrl.jump && dQ.ctrl.pc_jal_src) ? 2'b10 :
                        PCSrcE                               ? 2'b01 : 2'b00;

  ex_mem_t eD, eQ;
  assign eD = '{reg_write: dQ.ctrl.reg_write, result_src: dQ.ctrl.result_src,
                mem_write: dQ.ctrl.mem_write, alu_result: ALUResultE,
                write_data: WriteDataE, rd: dQ.rd, pc_plus4: dQ.pc_plus4,
                pc: dQ.pc, instr: dQ.instr};

  iex_imem u_iex_imem (
    .clk (clk), .reset (reset), .enable (1'b1), .clear (1'b0),
    .d (eD), .q (eQ)
  );

  // --------------------------------------------------------------- memory
  assign RegWriteM  = eQ.reg_write;
  assign RdM        = eQ.rd;
  assign MemWriteM  = eQ.mem_write;
  assign ALUResultM = eQ.alu_result;
  assign WriteDataM = eQ.write_data;

  mem_wb_t mD, mQ;
  assign mD = '{reg_write: eQ.reg_write, result_src: eQ.result_src,
                alu_result: eQ.alu_result, read_data: ReadDataM, rd: eQ.rd,
                pc_plus4: eQ.pc_plus4, pc: eQ.pc, instr: eQ.instr};

  imem_iw u_imem_iw (
    .clk (clk), .reset (reset), .enable (1'b1), .clear (1'b0),
    .d (mD), .q (mQ)
  );

  // A load in execute cannot also be a taken branch or jump, so the hazard
  // unit never asks decode to hold and to flush in the same cycle.
  a_no_stall_and_flush: assert property (@(posedge clk) disable iff (reset) !(StallD && FlushD))
    else $error("decode stalled and flushed in the same cycle");

  // ------------------------------------------------------------ writeback
  assign RegWriteW = mQ.reg_write;
  assign RdW       = mQ.rd;

  result_mux u_result_mux (
    .alu_result (mQ.alu_result), .mem_result (mQ.read_data),
    .wb_result (mQ.pc_plus4), .mem_to_wb (mQ.result_src),
    .write_data (ResultW)
  );

endmodule
