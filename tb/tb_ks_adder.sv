// tb_ks_adder: self-checking test of the Kogge-Stone adder at the 8, 16 and
// 32-bit widths, the 4-bit width of the textbook example and an odd width (13), with directed carry-chain cases
// (all-propagate operands, carry in/out) and random operands. The expected
// {cout, sum} is the plain integer sum a + b + cin computed one bit wider.
module tb_ks_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8,  s8;   logic c8i,  c8o;
  logic [15:0] a16, b16, s16;  logic c16i, c16o;
  logic [31:0] a32, b32, s32;  logic c32i, c32o;
  logic [12:0] a13, b13, s13;  logic c13i, c13o;
  logic [3:0]  a4,  b4,  s4;   logic c4i,  c4o;

  ks_adder #(.N(8))  u8  (.a(a8),  .b(b8),  .cin(c8i),  .sum(s8),  .cout(c8o));
  ks_adder #(.N(16)) u16 (.a(a16), .b(b16), .cin(c16i), .sum(s16), .cout(c16o));
  ks_adder #(.N(32)) u32 (.a(a32), .b(b32), .cin(c32i), .sum(s32), .cout(c32o));
  ks_adder #(.N(4))  u4  (.a(a4),  .b(b4),  .cin(c4i),  .sum(s4),  .cout(c4o));
  ks_adder #(.N(13)) u13 (.a(a13), .b(b13), .cin(c13i), .sum(s13), .cout(c13o));

  task automatic apply(input logic [31:0] a, input logic [31:0] b, input logic c);
    logic [32:0] e32;
    logic [16:0] e16;
    logic [8:0]  e8;
    logic [13:0] e13;
    logic [4:0]  e4;
    a8 = a[7:0];   b8 = b[7:0];   c8i = c;
    a16 = a[15:0]; b16 = b[15:0]; c16i = c;
    a32 = a;       b32 = b;       c32i = c;
    a13 = a[12:0]; b13 = b[12:0]; c13i = c;
    a4 = a[3:0];   b4 = b[3:0];   c4i = c;
    @(posedge clk);
    e32 = {1'b0, a} + {1'b0, b} + 33'(c);
    e16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(c);
    e8  = {1'b0, a[7:0]} + {1'b0, b[7:0]} + 9'(c);
    e13 = {1'b0, a[12:0]} + {1'b0, b[12:0]} + 14'(c);
    e4  = {1'b0, a[3:0]} + {1'b0, b[3:0]} + 5'(c);
    checks += 5;
    if ({c4o, s4} !== e4) begin failures++; $display("FAIL N=4 %h+%h+%b got %b_%h exp %h", a[3:0], b[3:0], c, c4o, s4, e4); end
    if ({c32o, s32} !== e32) begin failures++; $display("FAIL N=32 %h+%h+%b got %b_%h exp %h", a, b, c, c32o, s32, e32); end
    if ({c16o, s16} !== e16) begin failures++; $display("FAIL N=16 %h+%h+%b got %b_%h exp %h", a[15:0], b[15:0], c, c16o, s16, e16); end
    if ({c8o, s8}   !== e8)  begin failures++; $display("FAIL N=8 %h+%h+%b got %b_%h exp %h", a[7:0], b[7:0], c, c8o, s8, e8); end
    if ({c13o, s13} !== e13) begin failures++; $display("FAIL N=13 %h+%h+%b got %b_%h exp %h", a[12:0], b[12:0], c, c13o, s13, e13); end
  endtask

  initial begin
    // carry rippling through every position
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'h0000_0000, 32'h0000_0000, 1'b0);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 32; i++) begin
      apply(32'hFFFF_FFFF >> i, 32'h1 << (31 - i), 1'b0);   // carry generated at one bit
      apply(32'h1 << i, 32'h1 << i, 1'b0);
    end
    for (int i = 0; i < 3000; i++) apply($urandom, $urandom, 1'($urandom));
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
