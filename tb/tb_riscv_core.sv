// tb_riscv_core: end-to-end test of the RV32I core with the Kogge-Stone /
// Galois-field ALU, at its default size (4 KiB memory).
//
// The test assembles a program in the testbench (arithmetic with carry and
// overflow, compares, shifts, logic, GFMUL, byte/half/word loads and stores,
// a counted loop of GF multiplies, JAL, JALR, AUIPC, all branch kinds taken
// and not taken, FENCE, ECALL), loads it through the host port, releases
// reset and runs to the halt. A small instruction-set model in the
// testbench runs the same program; afterwards all 31 registers, the data
// area and the clock count (3/4/5 clocks per instruction by class) are
// compared with it, and a handful of results worked out by hand are checked
// as well. The testbench also counts how often each mechanism of the design
// occurred (each stage, taken and untaken branches, loads, stores, GFMUL,
// adder carry-out, signed overflow, jumps, halt) and fails any that never did.
module tb_riscv_core;
  import rv_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, host_we, halted, illegal;
  logic [31:0] host_addr, host_wdata, host_rdata, pc;
  stage_e      stage;

  riscv_core dut (
    .clk(clk), .rst_n(rst_n), .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .host_rdata(host_rdata), .halted(halted), .illegal(illegal), .pc(pc), .stage(stage)
  );

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] r_t(input logic [6:0] f7, input int rs2, input int rs1,
                                      input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input logic [2:0] f3,
                                      input int rd, input logic [6:0] opc);
    return {12'(imm), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), f3, m[4:0], OP_STORE};
  endfunction
  function automatic logic [31:0] b_t(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), f3, m[4:1], m[11], OP_BRANCH};
  endfunction
  function automatic logic [31:0] u_t(input logic [19:0] imm, input int rd, input logic [6:0] opc);
    return {imm, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] j_t(input int off, input int rd);
    logic [20:0] m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), OP_JAL};
  endfunction

  function automatic logic [31:0] addi(int rd, int rs1, int imm); return i_t(imm, rs1, 3'b000, rd, OP_IMM); endfunction
  function automatic logic [31:0] add(int rd, int rs1, int rs2);  return r_t(7'h00, rs2, rs1, 3'b000, rd, OP_REG); endfunction
  function automatic logic [31:0] sub(int rd, int rs1, int rs2);  return r_t(7'h20, rs2, rs1, 3'b000, rd, OP_REG); endfunction
  function automatic logic [31:0] gfmul(int rd, int rs1, int rs2); return r_t(7'h00, rs2, rs1, 3'b000, rd, OP_CUSTOM0); endfunction

  // ------------------------------------------------- instruction-set model
  logic [31:0] m_x [32];
  logic [7:0]  m_mem [4096];
  logic [31:0] m_pc;
  int          m_cycles;

  function automatic logic [31:0] gf32(input logic [31:0] x, input logic [31:0] z);
    logic [32:0] sh = {1'b0, x};
    logic [31:0] acc = '0;
    for (int i = 0; i < 32; i++) begin
      if (z[i]) acc ^= sh[31:0];
      sh = sh << 1;
      if (sh[32]) sh ^= 33'h1_0040_0007;
    end
    return acc;
  endfunction

  function automatic logic [31:0] ld32(input logic [31:0] a);
    int w = int'(a[11:0]) & ~3;
    return {m_mem[w+3], m_mem[w+2], m_mem[w+1], m_mem[w]};
  endfunction

  // runs the model to ECALL; returns the number of instructions executed
  task automatic model_run(output int n);
    logic [31:0] ins, a, b, res, ea, ii, si, bi, ui, ji, w;
    logic [4:0]  rd;
    logic [2:0]  f3;
    bit          done = 0;
    n = 0; m_pc = 0; m_cycles = 0;
    foreach (m_x[i]) m_x[i] = '0;
    while (!done && n < 100000) begin
      ins = ld32(m_pc);
      rd = ins[11:7]; f3 = ins[14:12];
      a = m_x[ins[19:15]]; b = m_x[ins[24:20]];
      ii = {{20{ins[31]}}, ins[31:20]};
      si = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      bi = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
      ui = {ins[31:12], 12'b0};
      ji = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
      n++;
      case (ins[6:0])
        OP_LUI:    begin m_x[rd] = ui; m_pc += 4; m_cycles += 4; end
        OP_AUIPC:  begin m_x[rd] = m_pc + ui; m_pc += 4; m_cycles += 4; end
        OP_JAL:    begin m_x[rd] = m_pc + 4; m_pc += ji; m_cycles += 4; end
        OP_JALR:   begin m_x[rd] = m_pc + 4; m_pc = (a + ii) & ~32'h1; m_cycles += 4; end
        OP_BRANCH: begin
          bit t;
          case (f3)
            3'b000: t = (a == b);
            3'b001: t = (a != b);
            3'b100: t = ($signed(a) < $signed(b));
            3'b101: t = ($signed(a) >= $signed(b));
            3'b110: t = (a < b);
            default: t = (a >= b);
          endcase
          m_pc = t ? m_pc + bi : m_pc + 4; m_cycles += 3;
        end
        OP_LOAD: begin
          ea = a + ii; w = ld32(ea) >> (8 * ea[1:0]);
          case (f3)
            3'b000: m_x[rd] = {{24{w[7]}}, w[7:0]};
            3'b001: m_x[rd] = {{16{w[15]}}, w[15:0]};
            3'b100: m_x[rd] = {24'b0, w[7:0]};
            3'b101: m_x[rd] = {16'b0, w[15:0]};
            default: m_x[rd] = w;
          endcase
          m_pc += 4; m_cycles += 5;
        end
        OP_STORE: begin
          ea = a + si;
          m_mem[int'(ea[11:0])] = b[7:0];
          if (f3 != 3'b000) m_mem[int'(ea[11:0]) + 1] = b[15:8];
          if (f3 == 3'b010) begin m_mem[int'(ea[11:0]) + 2] = b[23:16]; m_mem[int'(ea[11:0]) + 3] = b[31:24]; end
          m_pc += 4; m_cycles += 4;
        end
        OP_IMM, OP_REG: begin
          logic [31:0] y = (ins[6:0] == OP_REG) ? b : ii;
          case (f3)
            3'b000: res = (ins[6:0] == OP_REG && ins[30]) ? a - y : a + y;
            3'b001: res = a << y[4:0];
            3'b010: res = {31'b0, $signed(a) < $signed(y)};
            3'b011: res = {31'b0, a < y};
            3'b100: res = a ^ y;
            3'b101: res = ins[30] ? $unsigned($signed(a) >>> y[4:0]) : a >> y[4:0];
            3'b110: res = a | y;
            default: res = a & y;
          endcase
          m_x[rd] = res; m_pc += 4; m_cycles += 4;
        end
        OP_CUSTOM0: begin m_x[rd] = gf32(a, b); m_pc += 4; m_cycles += 4; end
        OP_FENCE:   begin m_pc += 4; m_cycles += 3; end
        default:    begin done = 1; m_cycles += 2; end   // ECALL
      endcase
      m_x[0] = '0;
    end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] prog [$];

  task automatic build_program();
    prog = {};
    prog.push_back(addi(1, 0, 100));                    //  0
    prog.push_back(addi(2, 0, -7));                     //  1
    prog.push_back(add(3, 1, 2));                       //  2  93 (adder carry-out)
    prog.push_back(sub(4, 2, 1));                       //  3  -107
    prog.push_back(u_t(20'h80000, 5, OP_LUI));          //  4
    prog.push_back(addi(5, 5, -1));                     //  5  7fffffff
    prog.push_back(addi(6, 5, 1));                      //  6  80000000 (signed overflow)
    prog.push_back(r_t(7'h00, 5, 6, 3'b010, 7, OP_REG));  //  7 slt  x7,x6,x5 -> 1
    prog.push_back(r_t(7'h00, 5, 6, 3'b011, 8, OP_REG));  //  8 sltu x8,x6,x5 -> 0
    prog.push_back(gfmul(9, 5, 6));                     //  9
    prog.push_back(addi(10, 0, 1024));                  // 10
    prog.push_back(add(10, 10, 10));                    // 11 x10 = 0x800
    prog.push_back(s_t(0, 3, 10, 3'b010));              // 12 sw x3,0(x10)
    prog.push_back(s_t(4, 4, 10, 3'b010));              // 13 sw x4,4(x10)
    prog.push_back(s_t(8, 9, 10, 3'b010));              // 14 sw x9,8(x10)
    prog.push_back(s_t(12, 1, 10, 3'b000));             // 15 sb x1,12(x10)
    prog.push_back(s_t(14, 2, 10, 3'b001));             // 16 sh x2,14(x10)
    prog.push_back(i_t(14, 10, 3'b000, 11, OP_LOAD));   // 17 lb  x11
    prog.push_back(i_t(14, 10, 3'b101, 12, OP_LOAD));   // 18 lhu x12
    prog.push_back(i_t(12, 10, 3'b100, 13, OP_LOAD));   // 19 lbu x13
    prog.push_back(i_t(4, 10, 3'b010, 14, OP_LOAD));    // 20 lw  x14
    prog.push_back(addi(15, 0, 1));                     // 21
    prog.push_back(addi(16, 0, 10));                    // 22
    prog.push_back(addi(17, 0, 3));                     // 23 x + 1
    prog.push_back(gfmul(15, 15, 17));                  // 24 loop: x15 *= (x+1)
    prog.push_back(addi(16, 16, -1));                   // 25
    prog.push_back(b_t(-8, 0, 16, 3'b001));             // 26 bne x16,x0,loop
    prog.push_back(s_t(16, 15, 10, 3'b010));            // 27 sw x15,16(x10)
    prog.push_back(j_t(12, 18));                        // 28 jal x18,+12 -> 31
    prog.push_back(addi(19, 0, 1));                     // 29 skipped
    prog.push_back(addi(19, 0, 2));                     // 30 skipped
    prog.push_back(u_t(20'h0, 20, OP_AUIPC));           // 31 x20 = 124
    prog.push_back(i_t(12, 20, 3'b000, 21, OP_JALR));   // 32 jalr x21,12(x20) -> 136
    prog.push_back(addi(19, 0, 3));                     // 33 skipped
    prog.push_back(b_t(8, 1, 2, 3'b100));               // 34 blt x2,x1 taken
    prog.push_back(addi(19, 0, 4));                     // 35 skipped
    prog.push_back(b_t(8, 1, 2, 3'b111));               // 36 bgeu x2,x1 taken
    prog.push_back(addi(19, 0, 5));                     // 37 skipped
    prog.push_back(b_t(8, 2, 1, 3'b000));               // 38 beq x1,x2 not taken
    prog.push_back(addi(22, 0, 77));                    // 39
    prog.push_back(i_t(12'h402, 4, 3'b101, 23, OP_IMM)); // 40 srai x23,x4,2
    prog.push_back(i_t(28, 4, 3'b101, 24, OP_IMM));     // 41 srli x24,x4,28
    prog.push_back(i_t(3, 1, 3'b001, 25, OP_IMM));      // 42 slli x25,x1,3
    prog.push_back(r_t(7'h00, 2, 1, 3'b110, 26, OP_REG)); // 43 or
    prog.push_back(r_t(7'h00, 2, 1, 3'b111, 27, OP_REG)); // 44 and
    prog.push_back(r_t(7'h00, 2, 1, 3'b100, 28, OP_REG)); // 45 xor
    prog.push_back(b_t(8, 2, 1, 3'b101));               // 46 bge x1,x2 taken
    prog.push_back(addi(19, 0, 6));                     // 47 skipped
    prog.push_back(b_t(8, 1, 2, 3'b110));               // 48 bltu x2,x1 not taken
    prog.push_back(b_t(8, 1, 1, 3'b100));               // 49 blt x1,x1 not taken
    prog.push_back(32'h0FF0000F);                       // 50 fence
    prog.push_back(s_t(20, 19, 10, 3'b010));            // 51 sw x19,20(x10)
    prog.push_back(s_t(24, 22, 10, 3'b010));            // 52 sw x22,24(x10)
    prog.push_back(r_t(7'h00, 17, 9, 3'b010, 29, OP_REG)); // 53 slt x29,x9,x17
    prog.push_back(b_t(8, 1, 1, 3'b000));               // 54 beq x1,x1 taken
    prog.push_back(addi(19, 0, 7));                     // 55 skipped
    prog.push_back(b_t(8, 1, 2, 3'b101));               // 56 bge x2,x1 not taken
    prog.push_back(b_t(8, 2, 1, 3'b110));               // 57 bltu x1,x2 taken
    prog.push_back(addi(19, 0, 8));                     // 58 skipped
    prog.push_back(b_t(8, 2, 1, 3'b111));               // 59 bgeu x1,x2 not taken
    prog.push_back(s_t(28, 19, 10, 3'b010));            // 60 sw x19,28(x10)
    prog.push_back(32'h00000073);                       // 61 ecall
  endtask

  // ---------------------------------------------------- mechanism counters
  int n_stage [5];
  int n_br_taken = 0, n_br_not = 0, n_load = 0, n_store = 0, n_gfmul = 0;
  int n_carry = 0, n_ovf = 0, n_jump = 0;
  int n_br_kind_t [8], n_br_kind_n [8];   // per funct3: taken / not taken
  logic counting = 1'b0;

  always @(posedge clk) if (counting && rst_n) begin
    if (int'(stage) < 5) n_stage[int'(stage)]++;
    if (stage == ST_EXECUTE && dut.u_dp.ir[6:0] == OP_BRANCH) begin
      if (dut.ctrl.bucl.pc_sel == PC_TARGET) begin n_br_taken++; n_br_kind_t[dut.u_dp.ir[14:12]]++; end
      else begin n_br_not++; n_br_kind_n[dut.u_dp.ir[14:12]]++; end
    end
    if (stage == ST_MEMORY && dut.ctrl.rcl.mdr_we) n_load++;
    if (stage == ST_MEMORY && dut.ctrl.mcl.we) n_store++;
    if (stage == ST_EXECUTE && dut.ctrl.alucl.op == ALU_GFMUL) n_gfmul++;
    if (stage == ST_EXECUTE && dut.ctrl.alucl.op == ALU_ADD && dut.u_dp.u_alu.add_cout) n_carry++;
    if (stage == ST_EXECUTE && dut.ctrl.alucl.op == ALU_ADD && dut.u_dp.u_alu.ovf) n_ovf++;
    if (stage == ST_WRITEBACK && dut.ctrl.bucl.pc_sel != PC_PLUS4) n_jump++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int ninstr, cycles;

  initial begin
    rst_n = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    foreach (n_stage[i]) n_stage[i] = 0;
    foreach (n_br_kind_t[i]) begin n_br_kind_t[i] = 0; n_br_kind_n[i] = 0; end
    build_program();
    foreach (m_mem[i]) m_mem[i] = '0;
    foreach (prog[i]) for (int k = 0; k < 4; k++) m_mem[4 * i + k] = prog[i][8*k +: 8];
    // load the whole memory (program, zeroed data) through the host port
    for (int w = 0; w < 1024; w++) begin
      @(negedge clk);
      host_we = 1; host_addr = 32'(4 * w);
      host_wdata = {m_mem[4*w+3], m_mem[4*w+2], m_mem[4*w+1], m_mem[4*w]};
    end
    @(negedge clk); host_we = 0;
    model_run(ninstr);

    @(negedge clk); rst_n = 1; counting = 1; cycles = 0;
    while (!halted && cycles < 10000) begin @(posedge clk); cycles++; #1; end
    @(negedge clk); counting = 0;

    check(halted && !illegal, "core halted on ECALL");
    check(cycles == m_cycles, $sformatf("clock count %0d, model %0d (%0d instructions)", cycles, m_cycles, ninstr));
    for (int r = 1; r < 32; r++)
      check(dut.u_dp.u_rf.regs[r] == m_x[r], $sformatf("x%0d = %h, model %h", r, dut.u_dp.u_rf.regs[r], m_x[r]));
    for (int w = 512; w < 520; w++) begin
      host_addr = 32'(4 * w); #1;
      check(host_rdata == ld32(32'(4 * w)), $sformatf("mem[%h] = %h, model %h", 4 * w, host_rdata, ld32(32'(4 * w))));
    end
    // hand-worked results
    check(dut.u_dp.u_rf.regs[3] == 32'd93, "add 100 + -7");
    check(dut.u_dp.u_rf.regs[4] == -32'sd107, "sub -7 - 100");
    check(dut.u_dp.u_rf.regs[7] == 32'd1 && dut.u_dp.u_rf.regs[8] == 32'd0, "slt/sltu at the sign boundary");
    check(dut.u_dp.u_rf.regs[9] == 32'hC010_0BFD, "gfmul of 7fffffff and 80000000 (worked out separately)");
    check(dut.u_dp.u_rf.regs[11] == 32'hFFFF_FFF9 && dut.u_dp.u_rf.regs[12] == 32'h0000_FFF9, "lb/lhu");
    check(dut.u_dp.u_rf.regs[13] == 32'd100, "lbu");
    check(dut.u_dp.u_rf.regs[15] == 32'h0000_0505, "(x+1)^10 = (x^8+1)(x^2+1) = x^10+x^8+x^2+1");
    check(dut.u_dp.u_rf.regs[18] == 32'd116 && dut.u_dp.u_rf.regs[21] == 32'd132, "jal/jalr link values");
    check(dut.u_dp.u_rf.regs[19] == 32'd0 && dut.u_dp.u_rf.regs[22] == 32'd77, "skipped and fall-through instructions");
    check(dut.u_dp.u_rf.regs[23] == -32'sd27 && dut.u_dp.u_rf.regs[24] == 32'hF, "srai/srli");
    check(pc == 32'(4 * 61), "pc stops at the ECALL");

    $display("mechanisms: F=%0d D=%0d E=%0d M=%0d W=%0d taken=%0d not_taken=%0d loads=%0d stores=%0d gfmul=%0d carry=%0d overflow=%0d jumps=%0d",
             n_stage[0], n_stage[1], n_stage[2], n_stage[3], n_stage[4], n_br_taken, n_br_not,
             n_load, n_store, n_gfmul, n_carry, n_ovf, n_jump);
    foreach (n_stage[i]) check(n_stage[i] > 0, $sformatf("stage %0d visited", i));
    check(n_br_taken > 0, "branch taken");
    check(n_br_not > 0, "branch not taken");
    foreach (n_br_kind_t[f]) if (f != 2 && f != 3)
      check(n_br_kind_t[f] > 0 && n_br_kind_n[f] > 0, $sformatf("branch funct3=%0d taken and not taken", f));
    check(n_load > 0, "load");
    check(n_store > 0, "store");
    check(n_gfmul > 0, "GF multiply");
    check(n_carry > 0, "adder carry-out");
    check(n_ovf > 0, "signed overflow");
    check(n_jump > 0, "jump");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
