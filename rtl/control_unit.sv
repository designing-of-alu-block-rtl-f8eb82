// control_unit: stage sequencer and instruction decoder of the RISC-V core.
//
// Every instruction walks through the five stages fetch, decode, execute,
// memory and write-back, one clock cycle per stage; stages an instruction
// has no use for are skipped:
//   ALU, LUI, AUIPC, JAL, JALR, GFMUL : F D E W      (4 cycles)
//   load                              : F D E M W    (5 cycles)
//   store                             : F D E M      (4 cycles)
//   branch, FENCE                     : F D E        (3 cycles)
// ECALL, EBREAK and any encoding outside RV32I + GFMUL stop the core in the
// HALT stage (halted = 1; illegal = 1 for an unknown encoding) until reset.
//
// The outputs are the four bundles of control lines to the data path and
// memory (rv_pkg::ctrl_t): RCL (register loads and write-back), MCL (memory
// access), ALUCL (ALU operation and operands) and BUCL (address bus and next
// PC). They are a combinational function of the stage register, the
// instruction register and, for branches, the ALU's zero flag and result
// bit 0. The five stages and the four line bundles follow the architecture
// this core is built to; the one-stage-per-cycle sequencing, the fields of
// each bundle and the stage skipping are this design's choices.
module control_unit
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ir,        // instruction register of the data path
  input  logic        alu_zero,  // ALU result == 0
  input  logic        alu_lsb,   // ALU result bit 0 (SLT/SLTU outcome)
  output ctrl_t       ctrl,
  output stage_e      stage,
  output logic        halted,
  output logic        illegal
);

  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  assign opc = ir[6:0];
  assign f3  = ir[14:12];
  assign f7  = ir[31:25];

  // ------------------------------------------------------------ decode
  logic dec_legal, is_load, is_store, is_branch, is_jal, is_jalr, is_fence, is_system;
  alu_op_e dec_op;
  asrc_e   dec_a;
  bsrc_e   dec_b;
  imm_e    dec_imm;

  always_comb begin
    dec_legal = 1'b0;
    is_load   = 1'b0;
    is_store  = 1'b0;
    is_branch = 1'b0;
    is_jal    = 1'b0;
    is_jalr   = 1'b0;
    is_fence  = 1'b0;
    is_system = 1'b0;
    dec_op    = ALU_ADD;
    dec_a     = ASRC_RS1;
    dec_b     = BSRC_IMM;
    dec_imm   = IMM_I;
    unique case (opc)
      OP_LUI: begin
        dec_legal = 1'b1; dec_op = ALU_PASSB; dec_imm = IMM_U;
      end
      OP_AUIPC: begin
        dec_legal = 1'b1; dec_a = ASRC_PC; dec_imm = IMM_U;
      end
      OP_JAL: begin
        dec_legal = 1'b1; is_jal = 1'b1; dec_imm = IMM_J;
      end
      OP_JALR: begin
        dec_legal = (f3 == 3'b000); is_jalr = 1'b1;
      end
      OP_BRANCH: begin
        dec_legal = (f3 != 3'b010) && (f3 != 3'b011);
        is_branch = 1'b1; dec_b = BSRC_RS2; dec_imm = IMM_B;
        unique case (f3[2:1])
          2'b00:   dec_op = ALU_SUB;    // BEQ/BNE: zero flag of a - b
          2'b10:   dec_op = ALU_SLT;    // BLT/BGE
          2'b11:   dec_op = ALU_SLTU;   // BLTU/BGEU
          default: dec_op = ALU_SUB;
        endcase
      end
      OP_LOAD: begin
        dec_legal = (f3 == 3'b000) || (f3 == 3'b001) || (f3 == 3'b010) ||
                    (f3 == 3'b100) || (f3 == 3'b101);
        is_load = 1'b1;
      end
      OP_STORE: begin
        dec_legal = (f3 == 3'b000) || (f3 == 3'b001) || (f3 == 3'b010);
        is_store = 1'b1; dec_imm = IMM_S;
      end
      OP_IMM, OP_REG: begin
        dec_legal = 1'b1;
        dec_b     = (opc == OP_REG) ? BSRC_RS2 : BSRC_IMM;
        unique case (f3)
          3'b000: dec_op = (opc == OP_REG && f7[5]) ? ALU_SUB : ALU_ADD;
          3'b001: dec_op = ALU_SLL;
          3'b010: dec_op = ALU_SLT;
          3'b011: dec_op = ALU_SLTU;
          3'b100: dec_op = ALU_XOR;
          3'b101: dec_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: dec_op = ALU_OR;
          default: dec_op = ALU_AND;
        endcase
        // funct7 must be 0, or 0100000 for SUB/SRA (SRAI); OP-IMM only checks shifts
        if (opc == OP_REG) begin
          if (!(f7 == 7'b0000000 || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101))))
            dec_legal = 1'b0;
        end else if (f3 == 3'b001 || f3 == 3'b101) begin
          if (!(f7 == 7'b0000000 || (f7 == 7'b0100000 && f3 == 3'b101)))
            dec_legal = 1'b0;
        end
      end
      OP_CUSTOM0: begin
        dec_legal = (f3 == 3'b000) && (f7 == 7'b0000000);
        dec_op = ALU_GFMUL; dec_b = BSRC_RS2;
      end
      OP_FENCE: begin
        dec_legal = 1'b1; is_fence = 1'b1;
      end
      OP_SYSTEM: begin
        dec_legal = 1'b1; is_system = 1'b1;
      end
      default: dec_legal = 1'b0;
    endcase
  end

  // the condition of a branch, from the ALU result in the execute stage
  logic br_taken;
  always_comb begin
    unique case (f3)
      3'b000:  br_taken =  alu_zero;   // BEQ
      3'b001:  br_taken = !alu_zero;   // BNE
      3'b100,
      3'b110:  br_taken =  alu_lsb;    // BLT, BLTU
      default: br_taken = !alu_lsb;    // BGE, BGEU
    endcase
  end

  // --------------------------------------------------------- sequencer
  stage_e stage_q, stage_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= ST_FETCH;
      illegal <= 1'b0;
    end else begin
      stage_q <= stage_d;
      if (stage_q == ST_DECODE && !dec_legal) illegal <= 1'b1;
    end
  end

  assign stage  = stage_q;
  assign halted = (stage_q == ST_HALT);

  always_comb begin
    ctrl    = '0;
    stage_d = stage_q;
    // operands and ALU operation are held steady for the whole instruction
    ctrl.alucl.op      = dec_op;
    ctrl.alucl.a_sel   = dec_a;
    ctrl.alucl.b_sel   = dec_b;
    ctrl.alucl.imm_sel = dec_imm;
    ctrl.mcl.size          = mem_size_e'((f3[1:0] == 2'b11) ? 2'b10 : f3[1:0]);
    ctrl.mcl.load_unsigned = f3[2];
    ctrl.rcl.wb_sel = is_load ? WB_MEM : ((is_jal || is_jalr) ? WB_PC4 : WB_ALU);
    ctrl.bucl.addr_sel = ADDR_ALUOUT;
    ctrl.bucl.pc_sel   = PC_PLUS4;

    unique case (stage_q)
      ST_FETCH: begin
        ctrl.bucl.addr_sel = ADDR_PC;
        ctrl.rcl.ir_we     = 1'b1;
        stage_d            = ST_DECODE;
      end
      ST_DECODE: begin
        ctrl.rcl.ab_we = 1'b1;
        stage_d = (!dec_legal || is_system) ? ST_HALT : ST_EXECUTE;
      end
      ST_EXECUTE: begin
        ctrl.rcl.aluout_we = 1'b1;
        if (is_branch) begin
          ctrl.bucl.pc_we  = 1'b1;
          ctrl.bucl.pc_sel = br_taken ? PC_TARGET : PC_PLUS4;
          stage_d          = ST_FETCH;
        end else if (is_fence) begin
          ctrl.bucl.pc_we = 1'b1;
          stage_d         = ST_FETCH;
        end else if (is_load || is_store) begin
          stage_d = ST_MEMORY;
        end else begin
          stage_d = ST_WRITEBACK;
        end
      end
      ST_MEMORY: begin
        ctrl.bucl.addr_sel = ADDR_ALUOUT;
        if (is_store) begin
          ctrl.mcl.we     = 1'b1;
          ctrl.bucl.pc_we = 1'b1;
          stage_d         = ST_FETCH;
        end else begin
          ctrl.rcl.mdr_we = 1'b1;
          stage_d         = ST_WRITEBACK;
        end
      end
      ST_WRITEBACK: begin
        ctrl.rcl.rf_we  = 1'b1;
        ctrl.bucl.pc_we = 1'b1;
        ctrl.bucl.pc_sel = is_jal ? PC_TARGET : (is_jalr ? PC_ALUOUT : PC_PLUS4);
        stage_d          = ST_FETCH;
      end
      default: stage_d = ST_HALT;   // ST_HALT and unused codes
    endcase
  end

endmodule
