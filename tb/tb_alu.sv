// tb_alu: self-checking test of the 32-bit ALU. Every operation is driven
// with directed corner operands (signed/unsigned boundaries, equal operands,
// large shift amounts) and random operands, and compared with a reference
// written with SystemVerilog's own operators; GFMUL is compared with a
// bit-serial GF(2^32) multiply modulo x^32 + x^22 + x^2 + x + 1.
module tb_alu;
  import rv_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        zero;

  alu #(.XLEN(32)) dut (.op(op), .a(a), .b(b), .result(y), .zero(zero));

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

  function automatic logic [31:0] expect_of(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_SLL:   return x << z[4:0];
      ALU_SLT:   return {31'b0, $signed(x) < $signed(z)};
      ALU_SLTU:  return {31'b0, x < z};
      ALU_XOR:   return x ^ z;
      ALU_SRL:   return x >> z[4:0];
      ALU_SRA:   return $unsigned($signed(x) >>> z[4:0]);
      ALU_OR:    return x | z;
      ALU_AND:   return x & z;
      ALU_GFMUL: return gf32(x, z);
      default:   return z;   // ALU_PASSB
    endcase
  endfunction

  task automatic apply(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    @(posedge clk);
    e = expect_of(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h (z=%b) exp %h", o.name(), x, z, y, zero, e);
    end
  endtask

  localparam logic [31:0] CORNER [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                                         32'h8000_0000, 32'h8000_0001, 32'h0000_001F, 32'h1234_5678};

  initial begin
    for (int o = 0; o <= int'(ALU_PASSB); o++)
      foreach (CORNER[i]) foreach (CORNER[j]) apply(alu_op_e'(o), CORNER[i], CORNER[j]);
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] x = $urandom, z = $urandom;
      if (n % 8 == 0) z = x;                       // equal operands
      apply(alu_op_e'($urandom_range(0, int'(ALU_PASSB))), x, z);
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
