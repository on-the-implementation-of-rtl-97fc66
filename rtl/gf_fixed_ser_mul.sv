// gf_fixed_ser_mul: fixed-coefficient bit-serial multiplier, D = A*B mod p(x)
// for a constant A.
//
// An m-bit register D_0..D_{m-1} holds the running product. Each clock one
// bit of B (most significant first) is added into the positions where A has
// a 1, while the register moves one position up and its top bit D_{m-1} is
// fed back into the positions where p(x) has a 1:
//   D_j <= D_{j-1} ^ (b & A_j) ^ (D_{m-1} & p_j),   D_{-1} = 0.
// Only wires and XOR gates remain because A and p(x) are constants. For the
// default A = x^3 + x^2, p = x^4 + x + 1 the circuit is
//   D0 <= D3,  D1 <= D0 ^ D3,  D2 <= D1 ^ b,  D3 <= D2 ^ b.
// After m clocks the register holds A*B mod p(x).
//
// Interface and timing:
//   clear     : D <= 0 (start of a product).
//   b_in      : one bit of B per clock, b_{m-1} first.
//   shift_out : the "Control" input. While high the feedback and the B input
//               are gated off, so D just shifts up and d_out = D_{m-1}
//               delivers the product MSB first, one bit per clock.
//   d         : the register, readable in parallel.
// The datapath follows the document; gating B during shift-out and the
// synchronous clear are this design's choices.
module gf_fixed_ser_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter logic [M-1:0] A_CONST = 4'b1100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         shift_out,
  input  logic         b_in,
  output logic [M-1:0] d,
  output logic         d_out
);
  logic fb, bb;

  assign fb = d[M-1] & ~shift_out;
  assign bb = b_in & ~shift_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0;
    end else if (clear) begin
      d <= '0;
    end else begin
      d <= {d[M-2:0], 1'b0} ^ ({M{bb}} & A_CONST) ^ ({M{fb}} & P[M-1:0]);
    end
  end

  assign d_out = d[M-1];
endmodule
