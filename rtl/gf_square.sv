// gf_square: standard-basis squarer, D = B^2 mod p(x).
//
// Squaring is linear over GF(2), so D = [T]B for a constant m x m matrix [T]
// whose column j is (x^j)^2 mod p(x). The matrix is worked out while the
// design elaborates and each output bit is the XOR of the input bits its row
// selects; no AND gates are needed. For the default GF(2^4), p = x^4 + x + 1,
// the rows are d0 = b0^b2, d1 = b2, d2 = b1^b3, d3 = b3 (two XOR gates).
//
// Interface: b in, d out, both m bits, purely combinational (no clock).
// The matrix construction follows the document; deriving it from the
// parameters rather than hard-wiring the GF(2^4) case is this design's choice.
module gf_square #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);
  localparam gf_pkg::mat_t T = gf_pkg::frob_mat(1, M, (gf_pkg::MAXM+1)'(P));

  for (genvar k = 0; k < M; k++) begin : g_row
    assign d[k] = ^(b & T[k][M-1:0]);
  end
endmodule
