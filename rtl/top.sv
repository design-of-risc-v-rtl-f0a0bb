// top: the complete processor: the riscv_pip_27 core with its instruction
// memory (imem) and data memory (dmem), as the original top design has them.
//
// After reset the core fetches from address 0 of imem, which is loaded from
// IMEM_INIT (default: the test program rtl/riscvtest.hex, read relative to
// the simulator's working directory). The data-memory port is brought out
// (WriteDataM, DataAdrM, MemWriteM) so that stores can be observed; a store
// is written into dmem on the rising edge at which MemWriteM is high.
// clk: rising-edge clock; reset: synchronous, active high.
module top #(
  parameter string       IMEM_INIT  = "rtl/riscvtest.hex",
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] WriteDataM,
  output logic [31:0] DataAdrM,
  output logic        MemWriteM
);

  logic [31:0] PCF, InstrF, ReadDataM;

  riscv_pip_27 u_riscv_pip_27 (
    .clk (clk), .reset (reset),
    .PCF (PCF), .InstrF (InstrF),
    .MemWriteM (MemWriteM), .ALUResultM (DataAdrM), .WriteDataM (WriteDataM),
    .ReadDataM (ReadDataM)
  );

  imem #(.WORDS (IMEM_WORDS), .INIT_FILE (IMEM_INIT)) u_imem (
    .a (PCF), .rd (InstrF)
  );

  dmem #(.WORDS (DMEM_WORDS)) u_dmem (
    .clk (clk), .we (MemWriteM), .a (DataAdrM), .wd (WriteDataM), .rd (ReadDataM)
  );

endmodule
