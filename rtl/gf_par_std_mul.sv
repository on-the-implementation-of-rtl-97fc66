// gf_par_std_mul: general-purpose bit-parallel standard-basis multiplier,
// D = A*B mod p(x), as a regular array of m x m identical cells.
//
// How it works: row i of the array carries B*x^i mod p(x) on its column
// lines; from one row to the next the lines move one position up, and the
// line leaving the top position is fed back into the positions where p(x)
// has a 1 (one XOR per such tap). Cell (i,j) holds one 2-input AND
// (a_i & (B*x^i)_j) and one 2-input XOR that adds it to the partial sum
// coming down column j. After the last row, column j holds d_j. The gate
// count is m^2 AND, m^2 XOR in the cells plus the reduction XORs, close to the
// m^2 AND / m^2+m XOR of the document's array. The critical path runs through
// the m rows, so the delay grows about linearly in m.
//
// Interface: a, b in, d out, m bits, combinational; the operand and result
// registers sit in the surrounding logic (one clock per product).
// The cell contents (AND + XOR) and the regular array follow the document;
// the exact way the partial products are routed between cells is this
// design's own.
module gf_par_std_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);
  // bx[i] = B * x^i mod p(x); s[i] = sum over rows 0..i-1
  logic [M-1:0] bx [M];
  logic [M-1:0] s  [M+1];

  assign bx[0] = b;
  assign s[0]  = '0;

  for (genvar i = 0; i < M; i++) begin : g_rowi
    if (i > 0) begin : g_shift
      assign bx[i] = {bx[i-1][M-2:0], 1'b0} ^ ({M{bx[i-1][M-1]}} & P[M-1:0]);
    end
    for (genvar j = 0; j < M; j++) begin : g_cell
      assign s[i+1][j] = s[i][j] ^ (a[i] & bx[i][j]);
    end
  end

  assign d = s[M];
endmodule
