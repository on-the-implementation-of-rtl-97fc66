// gf_dual_mul: Berlekamp dual-basis bit-serial multiplier.
//
// Z is held in the dual basis {lambda_k} of the standard basis {alpha^k}:
// coordinate z'_k = Tr(Z*alpha^k). G is held in the standard basis. Output
// coordinate k of the product W = Z*G (again in the dual basis) is
//   w'_k = Tr(Z*G*alpha^k) = XOR_j g_j & z'_{j+k},
// so each step is one AND array (m ANDs) and one XOR array over the current
// Z register. Replacing Z by alpha*Z moves every coordinate down by one
// (z'_k <- z'_{k+1}) and fills the top with Tr(Z*alpha^m) = XOR_j p_j z'_j;
// for p = x^4 + x + 1 that feedback is z'_0 ^ z'_1. One output bit per clock,
// w'_0 first, m clocks per product.
//
// Interface and timing:
//   z_ld = 1 : z_in enters at the top position z'_{m-1} and the register moves
//              down; send z'_0 first, m clocks.
//   g_ld = 1 : the G register loads g (parallel).
//   en   = 1 : w (registered, the output delay flip-flop) takes
//              XOR_j g_j & z'_j and Z is multiplied by alpha. After the k-th
//              en clock (k = 0..m-1) w holds w'_k.
// The datapath follows the document; the load/step controls and the
// registered output are this design's reading of its m+1 flip-flops.
module gf_dual_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         z_ld,
  input  logic         z_in,
  input  logic         g_ld,
  input  logic [M-1:0] g,
  input  logic         en,
  output logic         w
);
  logic [M-1:0] z_r, g_r;
  logic         fb;

  assign fb = ^(z_r & P[M-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_r <= '0;
      g_r <= '0;
      w   <= 1'b0;
    end else begin
      if (g_ld) g_r <= g;
      if (z_ld) begin
        z_r <= {z_in, z_r[M-1:1]};
      end else if (en) begin
        z_r <= {fb, z_r[M-1:1]};
        w   <= ^(z_r & g_r);
      end
    end
  end
endmodule
