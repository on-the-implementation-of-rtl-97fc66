// gf_nb_f: the Massey-Omura "function f" logic block of a normal-basis
// multiplier.
//
// In the normal basis {beta, beta^2, beta^4, ..., beta^(2^(m-1))} the last
// coordinate of a product, d_{m-1}, is a fixed bilinear form of the operand
// coordinates: an XOR of selected products a_i*b_j. This block is that AND
// array plus XOR array. Which products appear depends on the field
// polynomial and on the normal element beta = alpha^NB_EXP; the set is worked
// out while the design elaborates. For GF(2^4), p = x^4 + x + 1 and
// beta = alpha^7 (a root of x^4 + x^3 + 1) it is
//   f = a0b1 + a1b0 + a0b3 + a3b0 + a1b3 + a3b1 + a2b3 + a3b2 + a2b2
// (9 products, within the 2m..3m range expected of such blocks).
//
// Interface: a, b in (normal-basis coordinates, bit i = coefficient of
// beta^(2^i)), y out; combinational.
// The choice of beta is this design's: the field polynomial x^4 + x + 1 is
// not a normal polynomial, so alpha itself cannot be the normal element.
module gf_nb_f #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter int unsigned NB_EXP = 7
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         y
);
  localparam gf_pkg::pmask_t MASK = gf_pkg::nb_f_mask(NB_EXP, M, (gf_pkg::MAXM+1)'(P));

  gf_pkg::pmask_t prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        prod[i*gf_pkg::MAXM+j] = a[i] & b[j];
  end

  assign y = ^(prod & MASK);
endmodule
