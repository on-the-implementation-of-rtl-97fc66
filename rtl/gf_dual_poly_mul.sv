// gf_dual_poly_mul: multiplier of a field element Z by a polynomial
// G(x) = sum_i G_i x^i whose coefficients are field elements, using the
// dual-basis technique.
//
// One Z register (dual basis, same feedback as gf_dual_mul) is shared by
// NCOEF AND/XOR arrays, one per coefficient G_i (standard basis). At step k
// every array i outputs Tr(Z*G_i*alpha^k), i.e. coordinate k of Z*G_i in the
// dual basis, so after m steps every coefficient of Z*G(x) has been produced,
// bit-serially and all coefficients in parallel.
//
// Interface and timing are those of gf_dual_mul, with g carrying all
// coefficients (g[i] = G_i) and w[i] the registered output of array i: after
// the k-th en clock, w[i] = Tr(Z*G_i*alpha^k).
// The structure follows the document; the number of coefficients is a
// parameter whose default (4) is this design's choice.
module gf_dual_poly_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter int NCOEF = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    z_ld,
  input  logic                    z_in,
  input  logic                    g_ld,
  input  logic [NCOEF-1:0][M-1:0] g,
  input  logic                    en,
  output logic [NCOEF-1:0]        w
);
  logic [M-1:0]            z_r;
  logic [NCOEF-1:0][M-1:0] g_r;
  logic                    fb;

  assign fb = ^(z_r & P[M-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_r <= '0;
      g_r <= '0;
      w   <= '0;
    end else begin
      if (g_ld) g_r <= g;
      if (z_ld) begin
        z_r <= {z_in, z_r[M-1:1]};
      end else if (en) begin
        z_r <= {fb, z_r[M-1:1]};
        for (int i = 0; i < NCOEF; i++) w[i] <= ^(z_r & g_r[i]);
      end
    end
  end
endmodule
