// gf_par_add: bit-parallel GF(2^m) adder.
//
// m 2-input XOR gates add all coefficient pairs at once; the result register
// D captures A + B in one clock.
//
// Interface and timing: when en is high at a clock edge, d <= a ^ b.
// The structure follows the document; the enable is this design's choice.
module gf_par_add #(
  parameter int M = gf_pkg::DEF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= a ^ b;
  end
endmodule
