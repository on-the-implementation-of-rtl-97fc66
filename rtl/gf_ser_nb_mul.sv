// gf_ser_nb_mul: bit-serial Massey-Omura normal-basis multiplier.
//
// Two m-bit circular shift registers hold A and B and one function-f block
// (gf_nb_f) reads them. Each clock both registers rotate by one position,
// which squares both operands, so the same f block yields the next product
// coordinate: d_{m-1} first, then d_{m-2}, ..., d_0, one bit per clock,
// m clocks per product.
//
// Interface and timing:
//   ld = 1 : a_in and b_in are shifted into position 0 of the registers (the
//            contents move towards position m-1). After m such clocks the
//            first bit sent sits at position m-1, so send a_{m-1} first.
//   ld = 0 : both registers rotate by one position each clock.
//   d_out  : f(A_reg, B_reg), combinational from the registers. In the clock
//            right after loading it is d_{m-1}; k rotations later it is
//            d_{m-1-k}.
// Serial loading through the rotation path follows the document's figure;
// the ld control, the load order and the reset to 0 are this design's choices.
module gf_ser_nb_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter int unsigned NB_EXP = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ld,
  input  logic a_in,
  input  logic b_in,
  output logic d_out
);
  logic [M-1:0] a_r, b_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0;
      b_r <= '0;
    end else if (ld) begin
      a_r <= {a_r[M-2:0], a_in};
      b_r <= {b_r[M-2:0], b_in};
    end else begin
      a_r <= {a_r[M-2:0], a_r[M-1]};
      b_r <= {b_r[M-2:0], b_r[M-1]};
    end
  end

  gf_nb_f #(.M(M), .P(P), .NB_EXP(NB_EXP)) u_f (.a(a_r), .b(b_r), .y(d_out));
endmodule
