// gf_fixed_par_mul: fixed-coefficient bit-parallel multiplier, D = A*B mod p(x)
// for a constant A.
//
// With A fixed, the product is a linear function of B, D = [T]B, and the
// modulo reduction is folded into [T] beforehand. Column j of [T] is
// A*x^j mod p(x). Only XOR gates remain. The default is the worked example
// A = x^3 + x^2 = alpha^6 in GF(2^4) with p = x^4 + x + 1, where
//   d0 = b1^b2, d1 = b1^b3, d2 = b0^b2, d3 = b0^b1^b3.
//
// Interface: b in, d out, m bits, combinational.
// The structure and the example follow the document; computing [T] from the
// parameters is this design's choice.
module gf_fixed_par_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter logic [M-1:0] A_CONST = 4'b1100
) (
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);
  localparam gf_pkg::mat_t T =
    gf_pkg::const_mul_mat(gf_pkg::elem_t'(A_CONST), M, (gf_pkg::MAXM+1)'(P));

  for (genvar k = 0; k < M; k++) begin : g_row
    assign d[k] = ^(b & T[k][M-1:0]);
  end
endmodule
