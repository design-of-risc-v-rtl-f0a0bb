// rv_iss_pkg: testbench-only reference model of the processor's instruction
// set, plus instruction encoders and a random program generator.
//
// rv_iss executes one instruction per step() with plain RISC-V semantics
// (no pipeline), on its own register file and 1024-word data memory, and
// reports what the instruction wrote. Testbenches compare the pipeline's
// retired instructions and final state against it. Only the instructions
// the processor supports are modelled: add, sub, and, or, xor, slt, sll,
// srl, their immediate forms, lw, sw, beq, bne, blt, bge, jal, jalr, lui.
package rv_iss_pkg;

  function automatic logic [31:0] enc_r(int f7, int rs2, int rs1, int f3, int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_i(int imm, int rs1, int f3, int rd, logic [6:0] op);
    logic [11:0] i12 = 12'(imm);
    return {i12, 5'(rs1), 3'(f3), 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1);
    logic [11:0] i12 = 12'(imm);
    return {i12[11:5], 5'(rs2), 5'(rs1), 3'b010, i12[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(int off, int rs2, int rs1, int f3);
    logic [12:0] o = 13'(off);
    return {o[12], o[10:5], 5'(rs2), 5'(rs1), 3'(f3), o[4:1], o[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_j(int off, int rd);
    logic [20:0] o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] enc_u(int imm20, int rd);
    return {20'(imm20), 5'(rd), 7'b0110111};
  endfunction

  typedef struct {
    logic [31:0] pc;
    logic [31:0] instr;
    bit          wr_reg;
    logic [4:0]  rd;
    logic [31:0] rd_val;
    bit          wr_mem;
    logic [31:0] mem_addr;
    logic [31:0] mem_val;
  } retire_t;

  class rv_iss;
    logic [31:0] x  [32];
    logic [31:0] dm [1024];
    logic [31:0] im [1024];
    logic [31:0] pc;

    function new();
      foreach (x[i])  x[i]  = '0;
      foreach (dm[i]) dm[i] = '0;
      foreach (im[i]) im[i] = '0;
      pc = '0;
    endfunction

    function automatic retire_t step();
      retire_t     r;
      logic [31:0] in, a, b, res, immi, imms, immb, immj, nxt;
      logic [6:0]  op;
      logic [2:0]  f3;
      logic [4:0]  rd, rs1, rs2;
      bit          tk;
      in   = im[pc[11:2]];
      op   = in[6:0]; f3 = in[14:12]; rd = in[11:7]; rs1 = in[19:15]; rs2 = in[24:20];
      a    = x[rs1]; b = x[rs2];
      immi = {{20{in[31]}}, in[31:20]};
      imms = {{20{in[31]}}, in[31:25], in[11:7]};
      immb = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
      immj = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
      r = '{pc: pc, instr: in, wr_reg: 0, rd: rd, rd_val: 0, wr_mem: 0, mem_addr: 0, mem_val: 0};
      nxt = pc + 4;
      case (op)
        7'b0110011, 7'b0010011: begin
          logic [31:0] bb;
          bb = (op == 7'b0110011) ? b : immi;
          case (f3)
            3'b000: res = (op == 7'b0110011 && in[30]) ? a - bb : a + bb;
            3'b001: res = a << bb[4:0];
            3'b010: res = ($signed(a) < $signed(bb)) ? 32'd1 : 32'd0;
            3'b100: res = a ^ bb;
            3'b101: res = a >> bb[4:0];
            3'b110: res = a | bb;
            default: res = a & bb;
          endcase
          r.wr_reg = 1; r.rd_val = res;
        end
        7'b0000011: begin
          r.wr_reg = 1; r.rd_val = dm[((a + immi) >> 2) % 1024];
        end
        7'b0100011: begin
          r.wr_mem = 1; r.mem_addr = a + imms; r.mem_val = b;
          dm[(r.mem_addr >> 2) % 1024] = b;
        end
        7'b1100011: begin
          case (f3)
            3'b000:  tk = (a == b);
            3'b001:  tk = (a != b);
            3'b100:  tk = ($signed(a) < $signed(b));
            default: tk = ($signed(a) >= $signed(b));
          endcase
          if (tk) nxt = pc + immb;
        end
        7'b1101111: begin
          r.wr_reg = 1; r.rd_val = pc + 4; nxt = pc + immj;
        end
        7'b1100111: begin
          r.wr_reg = 1; r.rd_val = pc + 4; nxt = (a + immi) & ~32'd1;
        end
        7'b0110111: begin
          r.wr_reg = 1; r.rd_val = {in[31:12], 12'b0};
        end
        default: ;
      endcase
      if (r.wr_reg && rd != 0) x[rd] = r.rd_val;
      if (rd == 0) r.wr_reg = 0;
      pc = nxt;
      return r;
    endfunction
  endclass

  // Random program: n instructions using x1..x7 (jalr jumps to x0 + offset),
  // loads and stores at x0-relative word offsets 0..124, forward branches and
  // jumps only, ending in a branch-to-self at address 4*n.
  function automatic void gen_program(ref logic [31:0] im [1024], input int n);
    int pc, kind, t, rd, rs1, rs2;
    int rops[8] = '{0, 1, 2, 3, 4, 5, 6, 7};
    foreach (im[i]) im[i] = '0;
    for (pc = 0; pc < 4 * n; pc += 4) begin
      kind = $urandom_range(0, 99);
      rd  = $urandom_range(1, 7);
      rs1 = $urandom_range(0, 7);
      rs2 = $urandom_range(0, 7);
      t   = $urandom_range(1, 4);
      if (kind < 30) begin
        case (rops[$urandom_range(0, 7)])
          0: im[pc/4] = enc_r(0, rs2, rs1, 0, rd);
          1: im[pc/4] = enc_r(32, rs2, rs1, 0, rd);
          2: im[pc/4] = enc_r(0, rs2, rs1, 1, rd);
          3: im[pc/4] = enc_r(0, rs2, rs1, 2, rd);
          4: im[pc/4] = enc_r(0, rs2, rs1, 4, rd);
          5: im[pc/4] = enc_r(0, rs2, rs1, 5, rd);
          6: im[pc/4] = enc_r(0, rs2, rs1, 6, rd);
          default: im[pc/4] = enc_r(0, rs2, rs1, 7, rd);
        endcase
      end else if (kind < 50) begin
        case ($urandom_range(0, 6))
          0: im[pc/4] = enc_i($urandom_range(0, 4095) - 2048, rs1, 0, rd, 7'b0010011);
          1: im[pc/4] = enc_i($urandom_range(0, 31), rs1, 1, rd, 7'b0010011);
          2: im[pc/4] = enc_i($urandom_range(0, 4095) - 2048, rs1, 2, rd, 7'b0010011);
          3: im[pc/4] = enc_i($urandom_range(0, 4095) - 2048, rs1, 4, rd, 7'b0010011);
          4: im[pc/4] = enc_i($urandom_range(0, 31), rs1, 5, rd, 7'b0010011);
          5: im[pc/4] = enc_i($urandom_range(0, 4095) - 2048, rs1, 6, rd, 7'b0010011);
          default: im[pc/4] = enc_i($urandom_range(0, 4095) - 2048, rs1, 7, rd, 7'b0010011);
        endcase
      end else if (kind < 62) begin
        im[pc/4] = enc_i(4 * $urandom_range(0, 31), 0, 2, rd, 7'b0000011);
      end else if (kind < 72) begin
        im[pc/4] = enc_s(4 * $urandom_range(0, 31), rs2, 0);
      end else if (kind < 77) begin
        im[pc/4] = enc_u($urandom, rd);
      end else if (kind < 90 && pc + 4 * t < 4 * n) begin
        case ($urandom_range(0, 3))
          0: im[pc/4] = enc_b(4 * t, rs2, rs1, 0);
          1: im[pc/4] = enc_b(4 * t, rs2, rs1, 1);
          2: im[pc/4] = enc_b(4 * t, rs2, rs1, 4);
          default: im[pc/4] = enc_b(4 * t, rs2, rs1, 5);
        endcase
      end else if (kind < 95 && pc + 4 * t < 4 * n) begin
        im[pc/4] = enc_j(4 * t, $urandom_range(0, 7));
      end else if (pc + 4 * t < 4 * n) begin
        // jalr rd, target(x0): absolute forward target
        im[pc/4] = enc_i(pc + 4 * t, 0, 0, $urandom_range(0, 7), 7'b1100111);
      end else begin
        im[pc/4] = enc_r(0, rs2, rs1, 0, rd);
      end
    end
    im[n] = enc_b(0, 0, 0, 0);
  endfunction

endpackage
