// regfile: the RISC-V integer register file, 32 registers of XLEN bits.
//
// Two combinational read ports and one write port that writes on the rising
// clock edge. Register x0 is not stored: it always reads zero and writes to it
// are dropped. All registers are cleared by the active-low reset so that a
// program never reads an uninitialised value. The register file is part of
// the data path; its size is RV32I's, and the port arrangement and reset are
// this design's choices.
//
// Timing: a write at edge t is visible on the read ports after edge t; a read
// of the register being written in the same cycle returns the old value.
module regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output logic [XLEN-1:0]          rdata1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [XLEN-1:0]          rdata2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [XLEN-1:0]          wdata
);

  logic [XLEN-1:0] regs [1:NREGS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];

endmodule
