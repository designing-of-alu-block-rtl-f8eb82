// datapath: the registers, buses and arithmetic of the RISC-V core.
//
// State: program counter (pc), instruction register (ir), operand registers
// A and B (loaded from the register file in decode), the ALU output register
// and the memory data register (aligned, sign- or zero-extended load data).
// The execute stage runs the ALU (Kogge-Stone adder, Galois-field
// multiplier, shifts and logic) on A or pc and on B or the immediate. Two
// more Kogge-Stone adders form pc + 4 and the jump/branch target pc + imm.
// Write-back puts the ALU output register, the memory data register or
// pc + 4 into the register file.
//
// Everything is steered by the control lines of rv_pkg::ctrl_t; the data
// path makes no decisions of its own except the immediate format the
// control unit selects. A data path holding the ALU, registers and internal
// buses follows the architecture this core is built to; the multi-cycle
// register structure, the extra adders and the byte-lane store/load
// alignment are this design's choices. Misaligned halfword/word accesses
// are not trapped: the byte lanes simply wrap inside the addressed word.
//
// The store strobe itself (ctrl.mcl.we) goes from the control unit straight
// to the memory; the data path only supplies address, data and byte lanes.
//
// Timing: every register loads on the rising clock edge when its enable in
// ctrl.rcl / ctrl.bucl is high; the memory read data is used in the same
// cycle it is addressed (combinational read).
module datapath
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  output logic [31:0] ir,
  output logic [31:0] pc,
  output logic        alu_zero,
  output logic        alu_lsb,
  // memory unit, core port
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic [3:0]  mem_be,
  input  logic [31:0] mem_rdata
);

  logic [31:0] a_q, b_q, aluout_q, mdr_q;
  logic [31:0] rs1_data, rs2_data, imm, alu_a, alu_b, alu_y;
  logic [31:0] pc4, target, pc_next, wb_data, load_data, load_shifted;
  logic        pc4_cout, tgt_cout;
  logic [1:0]  boff;

  // ------------------------------------------------------- immediate
  always_comb begin
    unique case (ctrl.alucl.imm_sel)
      IMM_I:   imm = {{20{ir[31]}}, ir[31:20]};
      IMM_S:   imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      IMM_B:   imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      IMM_U:   imm = {ir[31:12], 12'b0};
      IMM_J:   imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

  // --------------------------------------------------- register file
  regfile #(.XLEN(32), .NREGS(32)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .raddr1 (ir[19:15]),
    .rdata1 (rs1_data),
    .raddr2 (ir[24:20]),
    .rdata2 (rs2_data),
    .we     (ctrl.rcl.rf_we),
    .waddr  (ir[11:7]),
    .wdata  (wb_data)
  );

  // -------------------------------------------------------------- ALU
  assign alu_a = (ctrl.alucl.a_sel == ASRC_PC)  ? pc  : a_q;
  assign alu_b = (ctrl.alucl.b_sel == BSRC_IMM) ? imm : b_q;

  alu #(.XLEN(32)) u_alu (
    .op     (ctrl.alucl.op),
    .a      (alu_a),
    .b      (alu_b),
    .result (alu_y),
    .zero   (alu_zero)
  );
  assign alu_lsb = alu_y[0];

  // ---------------------------------------------------- next-PC adders
  ks_adder #(.N(32)) u_pc4 (
    .a (pc), .b (32'd4), .cin (1'b0), .sum (pc4), .cout (pc4_cout)
  );
  ks_adder #(.N(32)) u_target (
    .a (pc), .b (imm), .cin (1'b0), .sum (target), .cout (tgt_cout)
  );

  always_comb begin
    unique case (ctrl.bucl.pc_sel)
      PC_TARGET: pc_next = target;
      PC_ALUOUT: pc_next = {aluout_q[31:1], 1'b0};
      default:   pc_next = pc4;
    endcase
  end

  // ------------------------------------------------------ memory port
  assign mem_addr = (ctrl.bucl.addr_sel == ADDR_PC) ? pc : aluout_q;
  assign boff     = mem_addr[1:0];
  assign mem_wdata = b_q << (8 * boff);

  always_comb begin
    unique case (ctrl.mcl.size)
      SZ_B:    mem_be = 4'b0001 << boff;
      SZ_H:    mem_be = 4'b0011 << boff;
      default: mem_be = 4'b1111;
    endcase
  end

  assign load_shifted = mem_rdata >> (8 * boff);
  always_comb begin
    unique case (ctrl.mcl.size)
      SZ_B:    load_data = ctrl.mcl.load_unsigned ? {24'b0, load_shifted[7:0]}
                                                  : {{24{load_shifted[7]}}, load_shifted[7:0]};
      SZ_H:    load_data = ctrl.mcl.load_unsigned ? {16'b0, load_shifted[15:0]}
                                                  : {{16{load_shifted[15]}}, load_shifted[15:0]};
      default: load_data = mem_rdata;
    endcase
  end

  // -------------------------------------------------------- write-back
  always_comb begin
    unique case (ctrl.rcl.wb_sel)
      WB_MEM:  wb_data = mdr_q;
      WB_PC4:  wb_data = pc4;
      default: wb_data = aluout_q;
    endcase
  end

  // --------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      ir       <= 32'h0000_0013;   // addi x0, x0, 0
      a_q      <= '0;
      b_q      <= '0;
      aluout_q <= '0;
      mdr_q    <= '0;
    end else begin
      if (ctrl.bucl.pc_we)     pc       <= pc_next;
      if (ctrl.rcl.ir_we)      ir       <= mem_rdata;
      if (ctrl.rcl.ab_we)      a_q      <= rs1_data;
      if (ctrl.rcl.ab_we)      b_q      <= rs2_data;
      if (ctrl.rcl.aluout_we)  aluout_q <= alu_y;
      if (ctrl.rcl.mdr_we)     mdr_q    <= load_data;
    end
  end

endmodule
