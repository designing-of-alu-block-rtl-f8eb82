// gf_mult: combinational multiplier in the binary extension field GF(2^M).
//
// A field element is an M-bit vector of polynomial coefficients (bit k is the
// coefficient of x^k). The product s(x) = a(x) * b(x) mod p(x) is formed in
// two steps:
//   1. Polynomial product: the M*M partial products a_i AND b_j are summed
//      with XOR into d(x) of degree 2M-2 (no carries, GF(2) addition).
//   2. Modular reduction: from the top coefficient d_(2M-2) down to d_M, a set
//      coefficient d_k is cancelled by XOR-ing p(x) shifted by k-M under it,
//      which leaves the M-bit remainder s(x).
// Both steps and the iterative reduction follow the structure this block is
// built to; the polynomial is a parameter. Its default for M = 4, 8, 16 and 32
// is a primitive polynomial chosen by this design (see rv_pkg), because no
// particular polynomial is fixed for the 8/16/32-bit multipliers.
//
// Interface: a, b -> p (product), purely combinational.
// POLY holds the low M coefficients of p(x); the x^M term is implied.
module gf_mult
  import rv_pkg::*;
#(
  parameter int unsigned M    = 32,
  parameter logic [M-1:0] POLY = M'(gf_default_poly(M))
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);

  localparam int unsigned DW = 2 * M - 1;   // width of the unreduced product

  initial begin
    assert (POLY[0]) else $error("gf_mult: POLY must have a constant term (M=%0d)", M);
  end

  logic [DW-1:0] prod;      // d(x) = a(x) * b(x)
  logic [DW-1:0] red;       // d(x) during reduction

  // 1. AND partial products, XOR accumulation
  always_comb begin
    prod = '0;
    for (int j = 0; j < M; j++) begin
      prod = prod ^ (DW'(a & {M{b[j]}}) << j);
    end
  end

  // 2. reduction from the highest-degree term downwards
  always_comb begin
    red = prod;
    for (int k = DW - 1; k >= int'(M); k--) begin
      if (red[k]) red = red ^ ((DW'(POLY) | (DW'(1) << M)) << (k - M));
    end
    p = red[M-1:0];
  end

endmodule
