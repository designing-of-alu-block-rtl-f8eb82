// tb_control_unit: self-checking test of the stage sequencer and decoder.
// For one instruction of every class it holds the instruction register,
// steps the unit from fetch and checks the stage sequence (and so the cycle
// count: 3, 4 or 5 clocks), the ALU operation, the write-back source and the
// register, memory and PC enables of each stage. Branches are checked taken
// and not taken; ECALL and an unknown encoding must halt (the latter with
// illegal set) and stay halted.
module tb_control_unit;
  import rv_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, alu_zero, alu_lsb, halted, illegal;
  logic [31:0] ir;
  ctrl_t       ctrl;
  stage_e      stage;

  control_unit dut (.clk(clk), .rst_n(rst_n), .ir(ir), .alu_zero(alu_zero), .alu_lsb(alu_lsb),
                    .ctrl(ctrl), .stage(stage), .halted(halted), .illegal(illegal));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (ir=%h stage=%s)", what, ir, stage.name()); end
  endtask

  // Run one instruction from reset; seq is the expected stage list, ending
  // where the unit returns to fetch (or halts).
  task automatic run(input logic [31:0] instr, input stage_e seq[$], input alu_op_e op,
                     input wb_sel_e wb, input pc_sel_e last_pc, input logic zero_in, input logic lsb_in);
    ir = instr; alu_zero = zero_in; alu_lsb = lsb_in;
    rst_n = 0; @(negedge clk); rst_n = 1;
    foreach (seq[i]) begin
      #1;
      check(stage == seq[i], $sformatf("stage %0d is %s", i, seq[i].name()));
      case (stage)
        ST_FETCH:     check(ctrl.rcl.ir_we && ctrl.bucl.addr_sel == ADDR_PC && !ctrl.rcl.rf_we && !ctrl.mcl.we, "fetch lines");
        ST_DECODE:    check(ctrl.rcl.ab_we && !ctrl.bucl.pc_we, "decode lines");
        ST_EXECUTE:   check(ctrl.rcl.aluout_we && ctrl.alucl.op == op, "execute lines");
        ST_MEMORY:    check(ctrl.bucl.addr_sel == ADDR_ALUOUT && (ctrl.mcl.we == (instr[6:0] == OP_STORE))
                            && (ctrl.rcl.mdr_we == (instr[6:0] == OP_LOAD)), "memory lines");
        ST_WRITEBACK: check(ctrl.rcl.rf_we && ctrl.rcl.wb_sel == wb && ctrl.bucl.pc_we, "write-back lines");
        default: ;
      endcase
      // the PC is written only in the instruction's last stage
      if (i == seq.size() - 1 && seq[i] != ST_HALT)
        check(ctrl.bucl.pc_we && ctrl.bucl.pc_sel == last_pc, "pc update in last stage");
      else
        check(!ctrl.bucl.pc_we, "no pc update before last stage");
      @(negedge clk);
    end
    #1;
    if (seq[seq.size() - 1] == ST_HALT) check(stage == ST_HALT && halted, "stays halted");
    else                                 check(stage == ST_FETCH, "back to fetch");
  endtask

  stage_e ALU_SEQ[$] = '{ST_FETCH, ST_DECODE, ST_EXECUTE, ST_WRITEBACK};
  stage_e LD_SEQ[$]  = '{ST_FETCH, ST_DECODE, ST_EXECUTE, ST_MEMORY, ST_WRITEBACK};
  stage_e ST_SEQ[$]  = '{ST_FETCH, ST_DECODE, ST_EXECUTE, ST_MEMORY};
  stage_e BR_SEQ[$]  = '{ST_FETCH, ST_DECODE, ST_EXECUTE};
  stage_e HLT_SEQ[$] = '{ST_FETCH, ST_DECODE, ST_HALT};

  initial begin
    rst_n = 0; ir = 32'h13; alu_zero = 0; alu_lsb = 0;
    @(negedge clk);
    run(32'h002081B3, ALU_SEQ, ALU_ADD,   WB_ALU, PC_PLUS4, 0, 0);  // add  x3,x1,x2
    run(32'h402081B3, ALU_SEQ, ALU_SUB,   WB_ALU, PC_PLUS4, 0, 0);  // sub  x3,x1,x2
    run(32'h4050D193, ALU_SEQ, ALU_SRA,   WB_ALU, PC_PLUS4, 0, 0);  // srai x3,x1,5
    run(32'h0020B1B3, ALU_SEQ, ALU_SLTU,  WB_ALU, PC_PLUS4, 0, 0);  // sltu x3,x1,x2
    run(32'hFFF0C193, ALU_SEQ, ALU_XOR,   WB_ALU, PC_PLUS4, 0, 0);  // xori x3,x1,-1
    run(32'h0020818B, ALU_SEQ, ALU_GFMUL, WB_ALU, PC_PLUS4, 0, 0);  // gfmul x3,x1,x2
    run(32'h123451B7, ALU_SEQ, ALU_PASSB, WB_ALU, PC_PLUS4, 0, 0);  // lui  x3,0x12345
    run(32'h00000197, ALU_SEQ, ALU_ADD,   WB_ALU, PC_PLUS4, 0, 0);  // auipc x3,0
    run(32'h008001EF, ALU_SEQ, ALU_ADD,   WB_PC4, PC_TARGET, 0, 0); // jal  x3,8
    run(32'h004081E7, ALU_SEQ, ALU_ADD,   WB_PC4, PC_ALUOUT, 0, 0); // jalr x3,4(x1)
    run(32'h0040A183, LD_SEQ,  ALU_ADD,   WB_MEM, PC_PLUS4, 0, 0);  // lw   x3,4(x1)
    run(32'h0040C183, LD_SEQ,  ALU_ADD,   WB_MEM, PC_PLUS4, 0, 0);  // lbu  x3,4(x1)
    run(32'h0030A223, ST_SEQ,  ALU_ADD,   WB_ALU, PC_PLUS4, 0, 0);  // sw   x3,4(x1)
    run(32'h00208463, BR_SEQ,  ALU_SUB,   WB_ALU, PC_TARGET, 1, 0); // beq taken
    run(32'h00208463, BR_SEQ,  ALU_SUB,   WB_ALU, PC_PLUS4, 0, 0);  // beq not taken
    run(32'h00209463, BR_SEQ,  ALU_SUB,   WB_ALU, PC_TARGET, 0, 0); // bne taken
    run(32'h0020C463, BR_SEQ,  ALU_SLT,   WB_ALU, PC_TARGET, 0, 1); // blt taken
    run(32'h0020D463, BR_SEQ,  ALU_SLT,   WB_ALU, PC_PLUS4, 0, 1);  // bge not taken
    run(32'h0020E463, BR_SEQ,  ALU_SLTU,  WB_ALU, PC_PLUS4, 0, 0);  // bltu not taken
    run(32'h0020F463, BR_SEQ,  ALU_SLTU,  WB_ALU, PC_TARGET, 0, 0); // bgeu taken
    run(32'h0FF0000F, BR_SEQ,  ALU_ADD,   WB_ALU, PC_PLUS4, 0, 0);  // fence
    run(32'h00000073, HLT_SEQ, ALU_ADD,   WB_ALU, PC_PLUS4, 0, 0);  // ecall
    check(!illegal, "ecall is not illegal");
    run(32'hFFFFFFFF, HLT_SEQ, ALU_ADD,   WB_ALU, PC_PLUS4, 0, 0);  // unknown
    check(illegal, "unknown encoding flags illegal");
    run(32'h8020818B, HLT_SEQ, ALU_GFMUL, WB_ALU, PC_PLUS4, 0, 0);  // custom-0 with bad funct7
    check(illegal, "bad funct7 flags illegal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
