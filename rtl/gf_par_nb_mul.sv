// gf_par_nb_mul: bit-parallel Massey-Omura normal-basis multiplier.
//
// Squaring in a normal basis is a cyclic shift: A^2 has coordinates
// [a_{m-1}, a_0, ..., a_{m-2}]. Since D^(2^s) = A^(2^s) * B^(2^s), the last
// coordinate of D^(2^s), which is d_{m-1-s}, is the same function f applied to
// A and B each rotated by s positions. The multiplier is therefore m copies
// of the function-f block (gf_nb_f), copy s wired to the operands rotated by
// s; no two copies differ except in their wiring. The result appears after
// the delay of one f block.
//
// Interface: a, b, d are normal-basis coordinates (bit i = coefficient of
// beta^(2^i)); combinational.
// Follows the document's bit-parallel scheme; the normal element (NB_EXP)
// is this design's choice, see gf_nb_f.
module gf_par_nb_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter int unsigned NB_EXP = 7
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);
  for (genvar s = 0; s < M; s++) begin : g_f
    logic [M-1:0] ar, br;
    // rotate by s: coordinate i moves to (i + s) mod m
    if (s == 0) begin : g_id
      assign ar = a;
      assign br = b;
    end else begin : g_rot
      assign ar = {a[M-1-s:0], a[M-1:M-s]};
      assign br = {b[M-1-s:0], b[M-1:M-s]};
    end
    gf_nb_f #(.M(M), .P(P), .NB_EXP(NB_EXP)) u_f (.a(ar), .b(br), .y(d[M-1-s]));
  end
endmodule
