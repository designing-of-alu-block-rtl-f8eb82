// mem_unit: byte-addressed memory holding both instructions and data.
//
// The array is organised as MEM_BYTES/4 words of 32 bits with a byte-write
// strobe per lane, the usual shape of an on-chip SRAM. The core port reads
// combinationally (the word that contains addr) and writes the enabled bytes
// on the rising clock edge. A second, host port lets a loader or test
// harness write and read whole words, for instance to place a program before
// reset is released; when both ports write the same word in one cycle the
// core wins.
//
// A single memory unit shared by instructions and data, reached from the
// control unit and the data path, follows the system architecture this core
// is built to; its size, word organisation, ports and timing are this
// design's choices. Addresses wrap modulo MEM_BYTES. Contents are not reset.
module mem_unit #(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  // core port
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  be,
  input  logic        we,
  output logic [31:0] rdata,
  // host port (word access)
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);

  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic [AW-1:0] widx, hidx;
  assign widx = addr[AW+1:2];
  assign hidx = host_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (host_we && !(we && widx == hidx)) mem[hidx] <= host_wdata;
    if (we) begin
      for (int k = 0; k < 4; k++) begin
        if (be[k]) mem[widx][8*k +: 8] <= wdata[8*k +: 8];
      end
    end
  end

  assign rdata      = mem[widx];
  assign host_rdata = mem[hidx];

endmodule
