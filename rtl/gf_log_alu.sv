// gf_log_alu: table look-up unit working on the logarithmic representation
// of field elements.
//
// Every nonzero element is a power alpha^k, 0 <= k <= 2^m - 2. Two ROMs of
// m bits x 2^m locations hold the antilog table (location k contains
// alpha^k) and the log table (location beta contains k with alpha^k = beta).
// With them,
//   multiplication  alpha^i * alpha^j = alpha^((i + j) mod (2^m - 1))
//   inversion       (alpha^j)^-1      = alpha^((2^m - 1 - j) mod (2^m - 1))
//   division        alpha^i / alpha^j = alpha^((i - j) mod (2^m - 1))
// reduce to adding or subtracting exponents modulo 2^m - 1. Both tables are
// generated while the design elaborates from p(x), by stepping alpha^k one
// multiplication by alpha at a time.
//
// Interface and timing: op selects MUL (0), INV (1, of b) or DIV (2, a / b);
// the result is registered, d is valid one clock after the operands. A zero
// operand gives d = 0; division by zero and inversion of zero also raise err.
// Unused location 2^m - 1 of the antilog table holds 1 (alpha^0) again.
// The tables and the exponent arithmetic follow the document; the op codes,
// the zero handling and the output register are this design's choices.
module gf_log_alu #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   op,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] d,
  output logic         err
);
  localparam int N = 2**M;
  localparam logic [M-1:0] NM1 = M'(N - 1);   // 2^m - 1, the group order

  typedef logic [M-1:0] rom_t [N];

  function automatic rom_t mk_alog();
    rom_t t;
    logic [M-1:0] v;
    v = M'(1);
    for (int k = 0; k < N; k++) begin
      t[k] = v;
      v = {v[M-2:0], 1'b0} ^ ({M{v[M-1]}} & P[M-1:0]);
    end
    return t;
  endfunction

  function automatic rom_t mk_log();
    rom_t t;
    logic [M-1:0] v;
    for (int k = 0; k < N; k++) t[k] = '0;
    v = M'(1);
    for (int k = 0; k < N - 1; k++) begin
      t[v] = M'(k);
      v = {v[M-2:0], 1'b0} ^ ({M{v[M-1]}} & P[M-1:0]);
    end
    return t;
  endfunction

  localparam rom_t ALOG = mk_alog();
  localparam rom_t LOG  = mk_log();

  // exponent arithmetic modulo 2^m - 1
  function automatic logic [M-1:0] add_mod(logic [M-1:0] x, logic [M-1:0] y);
    logic [M:0] s;
    s = {1'b0, x} + {1'b0, y};
    if (s >= {1'b0, NM1}) s = s - {1'b0, NM1};
    return s[M-1:0];
  endfunction

  function automatic logic [M-1:0] sub_mod(logic [M-1:0] x, logic [M-1:0] y);
    return (x >= y) ? x - y : x + (NM1 - y);
  endfunction

  logic [M-1:0] la, lb, e, res;
  logic         zero_res, bad;

  always_comb begin
    la = LOG[a];
    lb = LOG[b];
    e        = '0;
    zero_res = 1'b0;
    bad      = 1'b0;
    unique case (op)
      2'd0: begin
        e        = add_mod(la, lb);
        zero_res = (a == '0) || (b == '0);
      end
      2'd1: begin
        e        = sub_mod('0, lb);
        zero_res = (b == '0);
        bad      = (b == '0);
      end
      default: begin
        e        = sub_mod(la, lb);
        zero_res = (a == '0) || (b == '0);
        bad      = (b == '0);
      end
    endcase
    res = zero_res ? '0 : ALOG[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d   <= '0;
      err <= 1'b0;
    end else begin
      d   <= res;
      err <= bad;
    end
  end
endmodule
