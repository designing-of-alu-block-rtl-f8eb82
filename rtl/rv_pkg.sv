// rv_pkg: types and constants shared by the RISC-V core, its ALU and its
// Galois-field multiplier.
//
// The core is a 32-bit RV32I machine whose control unit talks to the data path
// through four bundles of control lines: register control (RCL), memory
// control (MCL), ALU control (ALUCL) and bus control (BUCL). Those four names
// and the five stages (fetch, decode, execute, memory, write-back) follow the
// system architecture this core is built to; the fields inside each bundle,
// the ALU operation encoding and the custom GF-multiply instruction are this
// design's own choices.
package rv_pkg;

  // ---------------------------------------------------------------- ALU
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,   // a + b            (Kogge-Stone adder)
    ALU_SUB   = 4'd1,   // a - b            (Kogge-Stone adder, b inverted, carry-in 1)
    ALU_SLL   = 4'd2,   // a << b[4:0]
    ALU_SLT   = 4'd3,   // signed a < b     (from the adder's difference)
    ALU_SLTU  = 4'd4,   // unsigned a < b   (from the adder's carry-out)
    ALU_XOR   = 4'd5,
    ALU_SRL   = 4'd6,
    ALU_SRA   = 4'd7,
    ALU_OR    = 4'd8,
    ALU_AND   = 4'd9,
    ALU_GFMUL = 4'd10,  // a * b in GF(2^XLEN) (Galois-field multiplier)
    ALU_PASSB = 4'd11   // b                (LUI)
  } alu_op_e;

  // ------------------------------------------------------------ opcodes
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;
  // custom-0 major opcode; funct3 = 000, funct7 = 0000000 is GFMUL rd, rs1, rs2
  localparam logic [6:0] OP_CUSTOM0 = 7'b0001011;

  // ------------------------------------------------------------- stages
  typedef enum logic [2:0] {
    ST_FETCH     = 3'd0,
    ST_DECODE    = 3'd1,
    ST_EXECUTE   = 3'd2,
    ST_MEMORY    = 3'd3,
    ST_WRITEBACK = 3'd4,
    ST_HALT      = 3'd5
  } stage_e;

  // ------------------------------------------------------ control lines
  typedef enum logic [1:0] {WB_ALU = 2'd0, WB_MEM = 2'd1, WB_PC4 = 2'd2} wb_sel_e;
  typedef enum logic [0:0] {ASRC_RS1 = 1'b0, ASRC_PC = 1'b1} asrc_e;
  typedef enum logic [0:0] {BSRC_RS2 = 1'b0, BSRC_IMM = 1'b1} bsrc_e;
  typedef enum logic [2:0] {IMM_I, IMM_S, IMM_B, IMM_U, IMM_J} imm_e;
  typedef enum logic [1:0] {PC_PLUS4 = 2'd0, PC_TARGET = 2'd1, PC_ALUOUT = 2'd2} pc_sel_e;
  typedef enum logic [0:0] {ADDR_PC = 1'b0, ADDR_ALUOUT = 1'b1} addr_sel_e;
  typedef enum logic [1:0] {SZ_B = 2'd0, SZ_H = 2'd1, SZ_W = 2'd2} mem_size_e;

  // RCL: which registers of the data path load at the next clock edge
  typedef struct packed {
    logic    ir_we;      // instruction register <- memory
    logic    ab_we;      // operand registers A/B <- register file
    logic    aluout_we;  // ALU output register <- ALU
    logic    mdr_we;     // memory data register <- aligned load data
    logic    rf_we;      // register file [rd] <- write-back bus
    wb_sel_e wb_sel;
  } rcl_t;

  // MCL: the memory access
  typedef struct packed {
    logic      we;          // store
    mem_size_e size;
    logic      load_unsigned;
  } mcl_t;

  // ALUCL: the operation and its operands
  typedef struct packed {
    alu_op_e op;
    asrc_e   a_sel;
    bsrc_e   b_sel;
    imm_e    imm_sel;
  } alucl_t;

  // BUCL: what drives the address bus and the next-PC bus
  typedef struct packed {
    addr_sel_e addr_sel;
    logic      pc_we;
    pc_sel_e   pc_sel;
  } bucl_t;

  typedef struct packed {
    rcl_t   rcl;
    mcl_t   mcl;
    alucl_t alucl;
    bucl_t  bucl;
  } ctrl_t;

  // ---------------------------------------------------- Galois field
  // Low-order terms of the default irreducible (primitive) polynomial p(x) of
  // GF(2^m); the x^m term is implied. 0 means "no default for this m".
  //   m = 4 : x^4 + x + 1
  //   m = 8 : x^8 + x^4 + x^3 + x^2 + 1
  //   m = 16: x^16 + x^12 + x^3 + x + 1
  //   m = 32: x^32 + x^22 + x^2 + x + 1
  function automatic logic [63:0] gf_default_poly(input int unsigned m);
    case (m)
      4:       return 64'h3;
      8:       return 64'h1D;
      16:      return 64'h100B;
      32:      return 64'h0040_0007;
      default: return 64'h0;
    endcase
  endfunction

endpackage
