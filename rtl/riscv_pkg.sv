// riscv_pkg: types and constants shared by the five-stage RV32I pipeline.
//
// Holds the opcode values the decoders recognise, the ALU operation codes,
// the immediate formats, the writeback and forwarding selects, and the
// structs that travel through the four pipeline registers (IF/ID, ID/IEx,
// IEx/IMem, IMem/IW). ALU codes 0..6 follow the numbering of the original
// ALU test (ADD=0, SUB=1, AND=2, OR=3, MUL=4, DIV=5, XOR=6); SLT=7, SLL=8
// and SRL=9 are this design's own choice, which is why the code is 4 bits.
package riscv_pkg;

  // Opcodes (instr[6:0])
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_AND = 4'd2,
    ALU_OR  = 4'd3,
    ALU_MUL = 4'd4,
    ALU_DIV = 4'd5,
    ALU_XOR = 4'd6,
    ALU_SLT = 4'd7,
    ALU_SLL = 4'd8,
    ALU_SRL = 4'd9
  } alu_ctrl_t;

  // ALUOp from the main decoder to the ALU decoder
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // loads, stores, jalr, lui
    ALUOP_SUB   = 2'b01,   // branches compare by subtraction
    ALUOP_FUNCT = 2'b10    // R-type and I-type arithmetic: look at funct3/funct7
  } alu_op_t;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_J = 3'd3,
    IMM_U = 3'd4
  } imm_src_t;

  typedef enum logic [1:0] {
    RES_ALU = 2'b00,
    RES_MEM = 2'b01,
    RES_PC4 = 2'b10
  } result_src_t;

  typedef enum logic [1:0] {
    FWD_RF  = 2'b00,       // value read from the register file in decode
    FWD_WB  = 2'b01,       // ResultW from the writeback stage
    FWD_MEM = 2'b10        // ALUResultM from the memory stage
  } fwd_t;

  // Control word produced in decode (the ...D signals)
  typedef struct packed {
    logic        reg_write;
    result_src_t result_src;
    logic        mem_write;
    logic        jump;
    logic        branch;
    alu_ctrl_t   alu_control;
    logic        alu_src_a;    // 0: rs1, 1: constant zero
    logic        alu_src_b;    // 0: rs2, 1: immediate
    logic        pc_jal_src;   // 0: PC + imm, 1: ALU result (jalr)
  } ctrl_t;

  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc;
    logic [31:0] pc_plus4;
  } if_id_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] rd1;
    logic [31:0] rd2;
    logic [31:0] pc;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic [31:0] imm_ext;
    logic [31:0] pc_plus4;
    logic [2:0]  funct3;
    logic [31:0] instr;
  } id_ex_t;

  typedef struct packed {
    logic        reg_write;
    result_src_t result_src;
    logic        mem_write;
    logic [31:0] alu_result;
    logic [31:0] write_data;
    logic [4:0]  rd;
    logic [31:0] pc_plus4;
    logic [31:0] pc;
    logic [31:0] instr;
  } ex_mem_t;

  typedef struct packed {
    logic        reg_write;
    result_src_t result_src;
    logic [31:0] alu_result;
    logic [31:0] read_data;
    logic [4:0]  rd;
    logic [31:0] pc_plus4;
    logic [31:0] pc;
    logic [31:0] instr;
  } mem_wb_t;

endpackage
