// tb_datapath: self-checking test of the data path on its own. The testbench
// plays the control unit, driving the RCL/MCL/ALUCL/BUCL lines stage by
// stage, and models the memory as a byte-strobed word array. It runs a few
// instructions of each kind (I-type, LUI, R-type add and GFMUL, halfword
// store, signed/unsigned byte loads, a branch compare, JAL, JALR) and checks
// the instruction register, the register file, the memory, the flags to the
// control unit and the program counter against values worked out here.
module tb_datapath;
  import rv_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, alu_zero, alu_lsb, mem_we;
  assign mem_we = ctrl.mcl.we;   // the store strobe comes from the control lines
  ctrl_t       ctrl;
  logic [31:0] ir, pc, mem_addr, mem_wdata, mem_rdata;
  logic [3:0]  mem_be;
  logic [31:0] tmem [256];

  datapath dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .ir(ir), .pc(pc), .alu_zero(alu_zero),
                .alu_lsb(alu_lsb), .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_be(mem_be),
                .mem_rdata(mem_rdata));

  assign mem_rdata = tmem[mem_addr[9:2]];
  always @(posedge clk) if (mem_we)
    for (int k = 0; k < 4; k++) if (mem_be[k]) tmem[mem_addr[9:2]][8*k +: 8] <= mem_wdata[8*k +: 8];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] xreg(input int r);
    return (r == 0) ? 32'h0 : dut.u_rf.regs[r];
  endfunction

  task automatic clock(input ctrl_t c);
    ctrl = c;
    @(posedge clk);
    @(negedge clk);
  endtask

  task automatic fetch_decode(output logic [31:0] pc_at);
    ctrl_t c = '0;
    pc_at = pc;
    c.bucl.addr_sel = ADDR_PC; c.rcl.ir_we = 1;
    clock(c);
    check(ir == tmem[pc_at[9:2]], $sformatf("ir loaded from pc %h", pc_at));
    c = '0; c.rcl.ab_we = 1;
    clock(c);
  endtask

  function automatic ctrl_t exec_lines(input alu_op_e op, input asrc_e a, input bsrc_e b, input imm_e imm);
    ctrl_t c = '0;
    c.alucl.op = op; c.alucl.a_sel = a; c.alucl.b_sel = b; c.alucl.imm_sel = imm;
    c.rcl.aluout_we = 1;
    return c;
  endfunction

  // execute then write back through the ALU output register
  task automatic alu_instr(input alu_op_e op, input asrc_e a, input bsrc_e b, input imm_e imm,
                           input wb_sel_e wb, input pc_sel_e ps);
    ctrl_t c;
    logic [31:0] p;
    fetch_decode(p);
    c = exec_lines(op, a, b, imm);
    clock(c);
    c.rcl.aluout_we = 0; c.rcl.rf_we = 1; c.rcl.wb_sel = wb; c.bucl.pc_we = 1; c.bucl.pc_sel = ps;
    clock(c);
  endtask

  task automatic mem_instr(input logic store, input mem_size_e sz, input logic uns);
    ctrl_t c;
    logic [31:0] p;
    fetch_decode(p);
    c = exec_lines(ALU_ADD, ASRC_RS1, BSRC_IMM, store ? IMM_S : IMM_I);
    clock(c);
    c.rcl.aluout_we = 0; c.bucl.addr_sel = ADDR_ALUOUT; c.mcl.size = sz; c.mcl.load_unsigned = uns;
    if (store) begin c.mcl.we = 1; c.bucl.pc_we = 1; clock(c); end
    else begin
      c.rcl.mdr_we = 1; clock(c);
      c.rcl.mdr_we = 0; c.rcl.rf_we = 1; c.rcl.wb_sel = WB_MEM; c.bucl.pc_we = 1; clock(c);
    end
  endtask

  initial begin
    ctrl_t c;
    logic [31:0] p;
    foreach (tmem[i]) tmem[i] = '0;
    tmem[0] = 32'hFFB00093;   // addi x1, x0, -5
    tmem[1] = 32'hABCDE137;   // lui  x2, 0xABCDE
    tmem[2] = 32'h002081B3;   // add  x3, x1, x2
    tmem[3] = 32'h0020828B;   // gfmul x5, x1, x2
    tmem[4] = 32'h10101023;   // sh   x1, 0x100(x0)
    tmem[5] = 32'h10100303;   // lb   x6, 0x101(x0)
    tmem[6] = 32'h10104383;   // lbu  x7, 0x101(x0)
    tmem[7] = 32'h00108463;   // beq  x1, x1, +8
    tmem[9] = 32'hFF9FF46F;   // jal  x8, -8       (to word 7)
    tmem[10] = 32'h00000013;
    ctrl = '0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(pc == 0 && ir == 32'h13, "reset state");

    alu_instr(ALU_ADD, ASRC_RS1, BSRC_IMM, IMM_I, WB_ALU, PC_PLUS4);
    check(xreg(1) == 32'hFFFF_FFFB && pc == 4, "addi x1 = -5");
    alu_instr(ALU_PASSB, ASRC_RS1, BSRC_IMM, IMM_U, WB_ALU, PC_PLUS4);
    check(xreg(2) == 32'hABCD_E000 && pc == 8, "lui x2");
    alu_instr(ALU_ADD, ASRC_RS1, BSRC_RS2, IMM_I, WB_ALU, PC_PLUS4);
    check(xreg(3) == 32'hABCD_DFFB, "add x3 = x1 + x2");
    alu_instr(ALU_GFMUL, ASRC_RS1, BSRC_RS2, IMM_I, WB_ALU, PC_PLUS4);
    // product worked out separately with the field polynomial x^32+x^22+x^2+x+1
    check(xreg(5) == 32'hD75F_E4C7, $sformatf("gfmul x5 = %h", xreg(5)));
    mem_instr(1'b1, SZ_H, 1'b0);
    check(tmem[64] == 32'h0000_FFFB, $sformatf("sh at byte 0x100 -> word %h", tmem[64]));
    mem_instr(1'b0, SZ_B, 1'b0);
    check(xreg(6) == 32'hFFFF_FFFF, "lb of byte 0x101 sign-extends");
    mem_instr(1'b0, SZ_B, 1'b1);
    check(xreg(7) == 32'h0000_00FF && pc == 28, "lbu of byte 0x101 zero-extends");

    // beq x1,x1: execute with SUB, zero flag must be set, take the branch
    fetch_decode(p);
    c = exec_lines(ALU_SUB, ASRC_RS1, BSRC_RS2, IMM_B);
    ctrl = c; #1;
    check(alu_zero == 1'b1, "beq compare sets zero");
    c.bucl.pc_we = 1; c.bucl.pc_sel = PC_TARGET;
    clock(c);
    check(pc == 36, $sformatf("branch target %0d", pc));

    // jal x8,-8 : link = 40, pc = 28
    alu_instr(ALU_ADD, ASRC_RS1, BSRC_IMM, IMM_J, WB_PC4, PC_TARGET);
    check(xreg(8) == 40 && pc == 28, "jal link and target");

    // jalr through the ALU output register: replace word 7 with jalr x9, 3(x1) -> (-5+3)&~1 = -2
    tmem[7] = 32'h003084E7;
    alu_instr(ALU_ADD, ASRC_RS1, BSRC_IMM, IMM_I, WB_PC4, PC_ALUOUT);
    check(xreg(9) == 32 && pc == 32'hFFFF_FFFE, "jalr link and target");

    // compare flag for SLT
    ctrl = exec_lines(ALU_SLT, ASRC_RS1, BSRC_RS2, IMM_I); #1;
    check(alu_lsb == 1'b0, "alu_lsb shows slt result");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
