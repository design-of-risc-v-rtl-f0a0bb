// regfile: the 32 x 32-bit general-purpose register file.
//
// Two combinational read ports (a1 -> rd1, a2 -> rd2) serve the decode
// stage; one write port (a3, wd3, we3) is written by the writeback stage on
// the rising clock edge. Register x0 always reads zero and ignores writes.
// A read of the register being written in the same cycle returns the new
// value (write-through), so an instruction in decode sees a result that is
// being written back; the original design leaves the write timing open and
// this is the choice made here. reset (synchronous) clears every register.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             we3,
  input  logic [AW-1:0]    a1,
  input  logic [AW-1:0]    a2,
  input  logic [AW-1:0]    a3,
  input  logic [WIDTH-1:0] wd3,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2
);

  logic [WIDTH-1:0] rf [NREGS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
    end else if (we3 && a3 != '0) begin
      rf[a3] <= wd3;
    end
  end

  always_comb begin
    if (a1 == '0)                 rd1 = '0;
    else if (we3 && a1 == a3)     rd1 = wd3;
    else                          rd1 = rf[a1];
    if (a2 == '0)                 rd2 = '0;
    else if (we3 && a2 == a3)     rd2 = wd3;
    else                          rd2 = rf[a2];
  end

endmodule
