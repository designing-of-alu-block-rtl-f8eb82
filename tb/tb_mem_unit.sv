// tb_mem_unit: self-checking test of the 4 KiB memory unit. Fills it through
// the host port, reads it back through both ports, then runs random
// byte-strobed core writes against a shadow byte array and checks the core
// and host read data, including address wrap-around past MEM_BYTES.
module tb_mem_unit;

  localparam int MEM_BYTES = 4096;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] addr, wdata, rdata, haddr, hwdata, hrdata;
  logic [3:0]  be;
  logic        we, hwe;
  logic [7:0]  shadow [MEM_BYTES];

  mem_unit #(.MEM_BYTES(MEM_BYTES)) dut (
    .clk(clk), .addr(addr), .wdata(wdata), .be(be), .we(we), .rdata(rdata),
    .host_we(hwe), .host_addr(haddr), .host_wdata(hwdata), .host_rdata(hrdata)
  );

  function automatic logic [31:0] word_at(input int byte_addr);
    int w = (byte_addr % MEM_BYTES) & ~3;
    return {shadow[w + 3], shadow[w + 2], shadow[w + 1], shadow[w]};
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; hwe = 0; be = 0; addr = 0; wdata = 0; haddr = 0; hwdata = 0;
    for (int w = 0; w < MEM_BYTES / 4; w++) begin
      logic [31:0] v = $urandom;
      @(negedge clk); hwe = 1; haddr = 32'(4 * w); hwdata = v;
      for (int k = 0; k < 4; k++) shadow[4 * w + k] = v[8*k +: 8];
    end
    @(negedge clk); hwe = 0;
    for (int w = 0; w < MEM_BYTES / 4; w += 7) begin
      addr = 32'(4 * w + ($urandom % 4)); haddr = 32'(4 * w); #1;
      check(rdata, word_at(4 * w), "core read after host fill");
      check(hrdata, word_at(4 * w), "host read after host fill");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1; addr = $urandom_range(0, 2 * MEM_BYTES - 1); be = 4'($urandom); wdata = $urandom;
      @(posedge clk);
      for (int k = 0; k < 4; k++)
        if (be[k]) shadow[((int'(addr) % MEM_BYTES) & ~3) + k] = wdata[8*k +: 8];
      @(negedge clk);
      we = 0; haddr = $urandom_range(0, MEM_BYTES - 1); #1;
      check(rdata, word_at(int'(addr)), "core read after strobed write");
      check(hrdata, word_at(int'(haddr)), "host read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
