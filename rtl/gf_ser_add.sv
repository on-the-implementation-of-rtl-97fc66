// gf_ser_add: bit-serial GF(2^m) adder.
//
// Addition in GF(2^m) is a bitwise XOR with no carry. Registers A and B are
// loaded in parallel, then shifted out least significant bit first through a
// single 2-input XOR gate into the result shift register D, which fills from
// its top end. After m shift clocks D holds A + B.
//
// Interface and timing:
//   ld : A <= a, B <= b (parallel load); takes priority over en.
//   en : one shift; after m en clocks d = a ^ b.
// The structure follows the document; the ld/en controls are this design's.
module gf_ser_add #(
  parameter int M = gf_pkg::DEF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         en,
  output logic [M-1:0] d
);
  logic [M-1:0] a_sr, b_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sr <= '0;
      b_sr <= '0;
      d    <= '0;
    end else if (ld) begin
      a_sr <= a;
      b_sr <= b;
    end else if (en) begin
      a_sr <= a_sr >> 1;
      b_sr <= b_sr >> 1;
      d    <= {a_sr[0] ^ b_sr[0], d[M-1:1]};
    end
  end
endmodule
