// riscv_core: a small RV32I processor whose execute-stage ALU is built from a
// Kogge-Stone parallel-prefix adder and a GF(2^32) Galois-field multiplier.
//
// Three units, connected as in the classic system view of a processor:
//   control_unit  sequences fetch, decode, execute, memory and write-back and
//                 drives the four bundles of control lines (RCL, MCL, ALUCL,
//                 BUCL) to the data path and memory;
//   datapath      pc, instruction and operand registers, register file, ALU
//                 (ks_adder + gf_mult), next-PC adders and load/store
//                 alignment;
//   mem_unit      one byte-addressed memory for instructions and data; its
//                 write strobe comes from the control unit, its address and
//                 data from the data path.
// The instruction set is RV32I (FENCE executes as a no-op; ECALL and EBREAK
// halt) plus one custom R-type instruction in the custom-0 opcode space,
//   GFMUL rd, rs1, rs2   (opcode 0001011, funct3 000, funct7 0000000)
// which writes the GF(2^32) product of rs1 and rs2 modulo
// x^32 + x^22 + x^2 + x + 1.
//
// Interface: clk, active-low asynchronous reset rst_n. Execution starts at
// address 0 when rst_n is released. The host port writes or reads memory
// words at any time (load a program while rst_n is low, read results after
// halted rises). halted stays high until reset; illegal marks a halt caused
// by an unknown encoding. pc and stage are for observation.
// Timing: one clock per stage, so 3 to 5 clocks per instruction (see
// control_unit).
module riscv_core
  import rv_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        halted,
  output logic        illegal,
  output logic [31:0] pc,
  output stage_e      stage
);

  ctrl_t       ctrl;
  logic [31:0] ir, mem_addr, mem_wdata, mem_rdata;
  logic [3:0]  mem_be;
  logic        alu_zero, alu_lsb;

  control_unit u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .ir       (ir),
    .alu_zero (alu_zero),
    .alu_lsb  (alu_lsb),
    .ctrl     (ctrl),
    .stage    (stage),
    .halted   (halted),
    .illegal  (illegal)
  );

  datapath u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .ctrl      (ctrl),
    .ir        (ir),
    .pc        (pc),
    .alu_zero  (alu_zero),
    .alu_lsb   (alu_lsb),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_be    (mem_be),
    .mem_rdata (mem_rdata)
  );

  mem_unit #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk        (clk),
    .addr       (mem_addr),
    .wdata      (mem_wdata),
    .be         (mem_be),
    .we         (ctrl.mcl.we),      // memory control lines, straight from the control unit
    .rdata      (mem_rdata),
    .host_we    (host_we),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .host_rdata (host_rdata)
  );

endmodule
