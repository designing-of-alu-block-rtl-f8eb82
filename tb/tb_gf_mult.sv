// tb_gf_mult: self-checking test of the GF(2^m) multiplier for m = 4, 8, 16
// and 32 with the default polynomials. The reference multiplies bit-serially
// (shift-and-add, reducing after every shift), which is a different
// algorithm from the block's full product followed by reduction. Directed
// cases cover 0, 1, x and all-ones operands; for m = 4 and m = 8 the test
// also walks the powers of x and checks that x has order 2^m - 1, i.e. that
// the polynomial used is primitive.
module tb_gf_mult;
  import rv_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  a4,  b4,  p4;
  logic [7:0]  a8,  b8,  p8;
  logic [15:0] a16, b16, p16;
  logic [31:0] a32, b32, p32;

  gf_mult #(.M(4))  u4  (.a(a4),  .b(b4),  .p(p4));
  gf_mult #(.M(8))  u8  (.a(a8),  .b(b8),  .p(p8));
  gf_mult #(.M(16)) u16 (.a(a16), .b(b16), .p(p16));
  gf_mult #(.M(32)) u32 (.a(a32), .b(b32), .p(p32));

  // bit-serial reference; poly holds p(x) including the x^m term
  function automatic logic [63:0] gf_ref(input logic [63:0] a, input logic [63:0] b,
                                         input int m, input logic [63:0] poly);
    logic [63:0] acc = '0;
    logic [63:0] sh  = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) acc ^= sh;
      sh = sh << 1;
      if (sh[m]) sh ^= poly;
    end
    return acc;
  endfunction

  localparam logic [63:0] P4  = 64'h13;
  localparam logic [63:0] P8  = 64'h11D;
  localparam logic [63:0] P16 = 64'h1100B;
  localparam logic [63:0] P32 = 64'h1_0040_0007;

  task automatic apply(input logic [31:0] a, input logic [31:0] b);
    logic [63:0] e4, e8, e16, e32;
    a4 = a[3:0]; b4 = b[3:0]; a8 = a[7:0]; b8 = b[7:0];
    a16 = a[15:0]; b16 = b[15:0]; a32 = a; b32 = b;
    @(posedge clk);
    e4  = gf_ref(64'(a[3:0]),  64'(b[3:0]),  4,  P4);
    e8  = gf_ref(64'(a[7:0]),  64'(b[7:0]),  8,  P8);
    e16 = gf_ref(64'(a[15:0]), 64'(b[15:0]), 16, P16);
    e32 = gf_ref(64'(a),       64'(b),       32, P32);
    checks += 4;
    if (p4  !== e4[3:0])   begin failures++; $display("FAIL m=4 %h*%h got %h exp %h", a4, b4, p4, e4[3:0]); end
    if (p8  !== e8[7:0])   begin failures++; $display("FAIL m=8 %h*%h got %h exp %h", a8, b8, p8, e8[7:0]); end
    if (p16 !== e16[15:0]) begin failures++; $display("FAIL m=16 %h*%h got %h exp %h", a16, b16, p16, e16[15:0]); end
    if (p32 !== e32[31:0]) begin failures++; $display("FAIL m=32 %h*%h got %h exp %h", a32, b32, p32, e32[31:0]); end
  endtask

  initial begin
    logic [7:0] pw;
    int order;
    // hand-worked values
    a4 = 4'h8; b4 = 4'h2;                          // x^3 * x = x^4 = x + 1
    a8 = 8'h80; b8 = 8'h02;                        // x^7 * x = x^8 = x^4+x^3+x^2+1
    a16 = 16'h8000; b16 = 16'h0002;                // x^16 = x^12+x^3+x+1
    a32 = 32'h8000_0000; b32 = 32'h0000_0002;      // x^32 = x^22+x^2+x+1
    @(posedge clk);
    checks += 4;
    if (p4  !== 4'h3)         begin failures++; $display("FAIL x^4 -> %h", p4); end
    if (p8  !== 8'h1D)        begin failures++; $display("FAIL x^8 -> %h", p8); end
    if (p16 !== 16'h100B)     begin failures++; $display("FAIL x^16 -> %h", p16); end
    if (p32 !== 32'h0040_0007) begin failures++; $display("FAIL x^32 -> %h", p32); end

    apply(32'h0, 32'h0);
    apply(32'h1, 32'hDEAD_BEEF);
    apply(32'hDEAD_BEEF, 32'h1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'h0000_0002, 32'h8000_0001);
    for (int i = 0; i < 32; i++) apply(32'h1 << i, 32'hFFFF_FFFF >> i);
    for (int i = 0; i < 2000; i++) apply($urandom, $urandom);

    // order of x in GF(2^8) through the block itself: x^k != 1 for 0<k<255, x^255 = 1
    pw = 8'h01; order = 0;
    for (int k = 1; k <= 255; k++) begin
      a8 = pw; b8 = 8'h02;
      @(posedge clk);
      pw = p8;
      if (pw == 8'h01 && order == 0) order = k;
    end
    checks++;
    if (order != 255) begin failures++; $display("FAIL order of x in GF(2^8) = %0d", order); end
    pw = 8'h01; order = 0;
    for (int k = 1; k <= 15; k++) begin
      a4 = pw[3:0]; b4 = 4'h2;
      @(posedge clk);
      pw = {4'h0, p4};
      if (pw == 8'h01 && order == 0) order = k;
    end
    checks++;
    if (order != 15) begin failures++; $display("FAIL order of x in GF(2^4) = %0d", order); end

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
