// dmem: data memory.
//
// WORDS x 32-bit words, byte-addressed by the ALU result: address bits
// [AW+1:2] pick the word, so only aligned word loads and stores (lw, sw)
// are served and addresses past the last word wrap. A store (we high) is
// written on the rising clock edge; the read port rd is combinational, so a
// stored word can be read back in the next cycle. The memory starts at zero.
// The 1024-word size and the write-enable / address / write-data interface
// follow the original design; word-only access is this design's choice.
module dmem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[a[AW+1:2]] <= wd;
  end

  assign rd = mem[a[AW+1:2]];

endmodule
