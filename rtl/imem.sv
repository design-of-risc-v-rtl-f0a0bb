// imem: instruction memory.
//
// WORDS x 32-bit words, read combinationally: rd = mem[a / 4], so the fetch
// address PCF advances by 4 per instruction and bits [1:0] are ignored.
// Addresses past the last word wrap. The contents are loaded at start-up
// with $readmemh from INIT_FILE (one 32-bit hex word per line, a path
// relative to the simulator's working directory); with an empty name the
// memory is left for a testbench to fill. The 1024-word size follows the
// original design; the file loading is this design's choice.
module imem #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic [31:0] a,
  output logic [31:0] rd
);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign rd = mem[a[AW+1:2]];

endmodule
