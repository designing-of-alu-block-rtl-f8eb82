// tb_regfile: self-checking test of the 32 x 32 register file. Checks reset
// to zero, that x0 ignores writes, and random write/read traffic on both read
// ports against a shadow array, including a read of the register being
// written in the same cycle (old value expected).
module tb_regfile;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];

  regfile #(.XLEN(32), .NREGS(32)) dut (
    .clk(clk), .rst_n(rst_n), .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
    .we(we), .waddr(wa), .wdata(wd)
  );

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); ra2 = 5'(31 - r); #1;
      check(rd1, 32'h0, "reset value port 1");
      check(rd2, 32'h0, "reset value port 2");
    end
    // write x0, must stay 0
    @(negedge clk); we = 1; wa = 0; wd = 32'hFFFF_FFFF;
    @(negedge clk); we = 0; ra1 = 0; #1;
    check(rd1, 32'h0, "x0 after write");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (n % 4 == 0) ? wa : 5'($urandom);
      #1;
      check(rd1, shadow[ra1], "read port 1");
      check(rd2, shadow[ra2], "read port 2 (same-cycle write reads old)");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
