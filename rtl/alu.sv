// alu: RV32I arithmetic-logic unit with a Kogge-Stone adder and a
// Galois-field multiplier built in.
//
// All additive work goes through one ks_adder instance: ADD uses a + b,
// while SUB, SLT and SLTU use a + ~b + 1. SLTU is "no carry out" of that
// subtraction, SLT is the sign of the difference corrected by the signed
// overflow. The gf_mult instance gives a * b in GF(2^XLEN) for the GFMUL
// operation. Shifts and logic operations are plain RTL.
//
// Putting the Kogge-Stone adder and the Galois-field multiplier into the
// execute-stage ALU of a RISC-V core is the point of this design; the
// operation list is RV32I's, and the operation encoding (rv_pkg::alu_op_e),
// the sharing of one adder for compare and subtract, and the zero flag are
// this design's own choices.
//
// Interface: purely combinational; op, a, b -> result, zero (result == 0).
module alu
  import rv_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] result,
  output logic            zero
);

  localparam int unsigned SHW = $clog2(XLEN);

  logic            sub;
  logic [XLEN-1:0] add_b, add_sum, gf_prod;
  logic            add_cout, ovf, lt_signed, lt_unsigned;

  assign sub   = (op != ALU_ADD);
  assign add_b = sub ? ~b : b;

  ks_adder #(.N(XLEN)) u_ksa (
    .a    (a),
    .b    (add_b),
    .cin  (sub),
    .sum  (add_sum),
    .cout (add_cout)
  );

  gf_mult #(.M(XLEN)) u_gfm (
    .a (a),
    .b (b),
    .p (gf_prod)
  );

  // a - b overflows when the operands' signs differ and the result's sign
  // differs from a's
  assign ovf         = (a[XLEN-1] ^ b[XLEN-1]) & (a[XLEN-1] ^ add_sum[XLEN-1]);
  assign lt_signed   = add_sum[XLEN-1] ^ ovf;
  assign lt_unsigned = ~add_cout;

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: result = add_sum;
      ALU_SLL:          result = a << b[SHW-1:0];
      ALU_SLT:          result = XLEN'(lt_signed);
      ALU_SLTU:         result = XLEN'(lt_unsigned);
      ALU_XOR:          result = a ^ b;
      ALU_SRL:          result = a >> b[SHW-1:0];
      ALU_SRA:          result = XLEN'($signed(a) >>> b[SHW-1:0]);
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_GFMUL:        result = gf_prod;
      ALU_PASSB:        result = b;
      default:          result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
