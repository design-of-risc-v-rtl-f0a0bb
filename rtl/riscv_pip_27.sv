// riscv_pip_27: the pipelined RV32I core.
//
// Joins the three units of the original design: control_unit decodes the
// instruction held in IF/ID, hazard_unit compares register numbers across
// the stages and drives stalls, flushes and forwarding, and datapath_unit
// carries each instruction through fetch, decode, execute, memory and
// writeback. The instruction and data memories are outside: PCF/InstrF is a
// combinational fetch port, and MemWriteM/ALUResultM/WriteDataM/ReadDataM a
// data port with a combinational read and a write on the next rising edge.
// reset is synchronous and active high; it clears the pipeline registers
// and the register file and starts fetching at RESET_PC.
// Supported instructions: add, sub, and, or, xor, slt, sll, srl and their
// immediate forms, lw, sw, beq, bne, blt, bge, jal, jalr, lui.
module riscv_pip_27
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] PCF,
  input  logic [31:0] InstrF,
  output logic        MemWriteM,
  output logic [31:0] ALUResultM,
  output logic [31:0] WriteDataM,
  input  logic [31:0] ReadDataM
);

  logic [31:0] InstrD;
  ctrl_t       ctrlD;
  imm_src_t    ImmSrcD;
  logic        StallF, StallD, FlushD, FlushE;
  fwd_t        ForwardAE, ForwardBE;
  logic [4:0]  Rs1D, Rs2D, Rs1E, Rs2E, RdE, RdM, RdW;
  logic        PCSrcE, ResultSrcE0, RegWriteM, RegWriteW;

  control_unit u_control_unit (
    .op       (InstrD[6:0]),
    .funct3   (InstrD[14:12]),
    .funct7b5 (InstrD[30]),
    .ctrl     (ctrlD),
    .imm_src  (ImmSrcD)
  );

  hazard_unit u_hazard_unit (
    .Rs1D (Rs1D), .Rs2D (Rs2D), .Rs1E (Rs1E), .Rs2E (Rs2E), .RdE (RdE),
    .PCSrcE (PCSrcE), .ResultSrcE0 (ResultSrcE0),
    .RdM (RdM), .RegWriteM (RegWriteM), .RdW (RdW), .RegWriteW (RegWriteW),
    .StallF (StallF), .StallD (StallD), .FlushD (FlushD), .FlushE (FlushE),
    .ForwardAE (ForwardAE), .ForwardBE (ForwardBE)
  );

  datapath_unit #(.RESET_PC (RESET_PC)) u_datapath_unit (
    .clk (clk), .reset (reset),
    .PCF (PCF), .InstrF (InstrF),
    .InstrD (InstrD), .ctrlD (ctrlD), .ImmSrcD (ImmSrcD),
    .StallF (StallF), .StallD (StallD), .FlushD (FlushD), .FlushE (FlushE),
    .ForwardAE (ForwardAE), .ForwardBE (ForwardBE),
    .Rs1D (Rs1D), .Rs2D (Rs2D), .Rs1E (Rs1E), .Rs2E (Rs2E), .RdE (RdE),
    .PCSrcE (PCSrcE), .ResultSrcE0 (ResultSrcE0),
    .RdM (RdM), .RegWriteM (RegWriteM), .RdW (RdW), .RegWriteW (RegWriteW),
    .MemWriteM (MemWriteM), .ALUResultM (ALUResultM), .WriteDataM (WriteDataM),
    .ReadDataM (ReadDataM)
  );

endmodule
