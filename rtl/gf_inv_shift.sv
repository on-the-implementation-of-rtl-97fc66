// gf_inv_shift: bit-serial shift-register inverter (and divider).
//
// Two m-bit shift registers, each hard-wired as the linear feedback shift
// register of p(x), so one clock multiplies its content by alpha. Register A
// starts at 1 and register B at beta. After k clocks A = alpha^k and
// B = beta*alpha^k; the ratio A/B stays 1/beta. Clocking stops when B equals 1
// (a fixed pattern detector on B), and A then holds beta^-1. Starting A at
// any element num instead of 1 keeps the ratio num/beta, so the same circuit
// computes the combined multiplication-inversion num * beta^-1. Because alpha
// generates all nonzero elements this takes at most 2^m - 2 shifts. No
// multiplier or comparator is needed: the cost is 2m flip-flops and the XOR
// taps of p(x).
//
// Interface and timing:
//   start  : A <= num (1 for a plain inversion), B <= beta, busy rises.
//   busy   : shifting; each clock with B != 1 shifts both registers.
//   done   : one-clock pulse when B = 1 has been reached; inv = A is valid
//            from then until the next start; it equals num * beta^-1. cycles gives the number of
//            shifts made (0 when beta = 1).
//   A zero beta has no inverse: it is detected at start and answered with
//   inv = 0 and done right after the start clock.
// The two-register scheme, the stop on B = 1 and the multiplication-
// inversion use follow the document; the zero check, the shift counter and
// the handshake are this design's choices.
module gf_inv_shift #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] beta,
  input  logic [M-1:0] num,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] inv,
  output logic [M:0]   cycles
);
  logic [M-1:0] a_r, b_r;
  logic         b_is_one;

  assign b_is_one = (b_r == M'(1));

  function automatic logic [M-1:0] times_alpha(logic [M-1:0] v);
    return {v[M-2:0], 1'b0} ^ ({M{v[M-1]}} & P[M-1:0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r    <= '0;
      b_r    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      cycles <= '0;
    end else if (start) begin
      cycles <= '0;
      if (beta == '0) begin
        a_r  <= '0;
        b_r  <= '0;
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        a_r  <= num;
        b_r  <= beta;
        busy <= 1'b1;
        done <= 1'b0;
      end
    end else if (busy) begin
      if (b_is_one) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        a_r    <= times_alpha(a_r);
        b_r    <= times_alpha(b_r);
        cycles <= cycles + 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  // handshake rule: a finished result is never reported while still busy;
  // checked only out of reset, hence the empty reset branch
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin end
    else a_done_not_busy: assert (!(busy && done));

  assign inv = a_r;
endmodule
