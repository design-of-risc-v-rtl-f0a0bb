// hazard_unit: data- and control-hazard logic of the five-stage pipeline.
//
// Forwarding: when the instruction in execute reads a register that the
// instruction in memory (RegWriteM, RdM) or writeback (RegWriteW, RdW) is
// about to write, ForwardAE/ForwardBE select that newer value instead of
// the one read in decode; the memory stage has priority as it is newer, and
// x0 is never forwarded. Encoding (riscv_pkg::fwd_t): 00 register file,
// 01 ResultW, 10 ALUResultM.
// Load-use stall: a load in execute (ResultSrcE0) whose RdE is a source of
// the instruction in decode cannot be forwarded in time, so the PC and IF/ID
// hold (StallF, StallD) for one cycle and a bubble enters execute (FlushE).
// Control hazard: a taken branch or jump is resolved in execute (PCSrcE);
// the two younger instructions in decode and execute are flushed (FlushD,
// FlushE). Combinational. The signal names are those of the original
// pipeline diagram; the exact rules above are this design's reading.
module hazard_unit
  import riscv_pkg::*;
(
  input  logic [4:0] Rs1D,
  input  logic [4:0] Rs2D,
  input  logic [4:0] Rs1E,
  input  logic [4:0] Rs2E,
  input  logic [4:0] RdE,
  input  logic       PCSrcE,
  input  logic       ResultSrcE0,
  input  logic [4:0] RdM,
  input  logic       RegWriteM,
  input  logic [4:0] RdW,
  input  logic       RegWriteW,
  output logic       StallF,
  output logic       StallD,
  output logic       FlushD,
  output logic       FlushE,
  output fwd_t       ForwardAE,
  output fwd_t       ForwardBE
);

  function automatic fwd_t fwd_sel(input logic [4:0] rs);
    if (rs != '0 && RegWriteM && rs == RdM)      return FWD_MEM;
    else if (rs != '0 && RegWriteW && rs == RdW) return FWD_WB;
    else                                         return FWD_RF;
  endfunction

  logic lw_stall;

  always_comb begin
    ForwardAE = fwd_sel(Rs1E);
    ForwardBE = fwd_sel(Rs2E);
    lw_stall  = ResultSrcE0 && RdE != '0 && (Rs1D == RdE || Rs2D == RdE);
    StallF    = lw_stall;
    StallD    = lw_stall;
    FlushD    = PCSrcE;
    FlushE    = lw_stall || PCSrcE;
  end

endmodule
