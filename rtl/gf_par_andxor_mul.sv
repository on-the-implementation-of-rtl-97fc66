// gf_par_andxor_mul: bit-parallel standard-basis multiplier in two layers,
// an AND array followed by an XOR array.
//
// All m^2 products a_i*b_j are formed at once. Output bit d_k is then the
// XOR of every product a_i*b_j for which x^(i+j) mod p(x) has a 1 at
// position k, i.e. the reduction is pre-computed into fixed XOR groups, one
// group per output bit. For GF(2^4), p = x^4 + x + 1, the groups are
//   d0 = a0b0 + a1b3 + a2b2 + a3b1
//   d1 = a0b1 + a1b0 + a1b3 + a2b2 + a3b1 + a2b3 + a3b2
//   d2 = a0b2 + a1b1 + a2b0 + a2b3 + a3b2 + a3b3
//   d3 = a0b3 + a1b2 + a2b1 + a3b0 + a3b3
// and the largest group (7 terms) is a 3-level XOR tree. The delay is one AND
// plus about log2(2m) XOR levels, shorter than the cell array's.
//
// Interface: a, b in, d out, m bits, combinational.
// The two-array structure follows the document; deriving the XOR groups
// from the parameters is this design's choice.
module gf_par_andxor_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);
  // AND array, flattened as bit (i*MAXM + j)
  gf_pkg::pmask_t prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        prod[i*gf_pkg::MAXM+j] = a[i] & b[j];
  end

  // XOR array
  for (genvar k = 0; k < M; k++) begin : g_out
    localparam gf_pkg::pmask_t MASK = gf_pkg::std_prod_mask(k, M, (gf_pkg::MAXM+1)'(P));
    assign d[k] = ^(prod & MASK);
  end
endmodule
