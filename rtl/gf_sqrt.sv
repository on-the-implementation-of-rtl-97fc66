// gf_sqrt: standard-basis square root, D = sqrt(B).
//
// The square root is the inverse of the squaring map, again a constant GF(2)
// matrix [T]^-1. Because B^(2^m) = B in GF(2^m), sqrt(B) = B^(2^(m-1)); the
// matrix column j is therefore (x^j)^(2^(m-1)) mod p(x), computed while the
// design elaborates. Each output is an XOR of the input bits its row selects.
// For GF(2^4), p = x^4 + x + 1: d0 = b0^b1, d1 = b2^b3, d2 = b1, d3 = b3.
//
// Interface: b in, d out, m bits, combinational.
// The matrix form follows the document; building it by repeated squaring is
// this design's own way of obtaining the inverse matrix for any m.
module gf_sqrt #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);
  localparam gf_pkg::mat_t TI = gf_pkg::frob_mat(M - 1, M, (gf_pkg::MAXM+1)'(P));

  for (genvar k = 0; k < M; k++) begin : g_row
    assign d[k] = ^(b & TI[k][M-1:0]);
  end
endmodule
