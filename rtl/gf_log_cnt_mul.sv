// gf_log_cnt_mul: multiplication by counting through the antilog table.
//
// With elements written as powers, alpha^i * alpha^j = alpha^(i+j). Instead
// of adding the exponents, this unit starts an address counter at i and
// counts it up j times, modulo 2^m - 1; the antilog table (location k holds
// alpha^k) then reads out the product. It needs no adder and no log table,
// only a modulo-(2^m - 1) counter, at the cost of j clocks. The table is
// generated from p(x) while the design elaborates.
//
// Interface and timing:
//   start      : load the counter with i_exp and the step count with j_exp.
//   busy       : counting, one step per clock, j_exp clocks.
//   done       : one-clock pulse when counting has finished (in the clock
//                after start when j_exp = 0).
//   d, exp_out : alpha^exp_out and the counter; valid from done until the
//                next start.
// Exponents range over 0 .. 2^m - 2; an input of 2^m - 1 is taken as 0.
// Counting on the address follows the document; the handshake and the
// handling of the out-of-range exponent are this design's choices.
module gf_log_cnt_mul #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] i_exp,
  input  logic [M-1:0] j_exp,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] d,
  output logic [M-1:0] exp_out
);
  localparam int N = 2**M;
  localparam logic [M-1:0] NM1 = M'(N - 1);

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

  localparam rom_t ALOG = mk_alog();

  logic [M-1:0] addr, steps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      steps <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else if (start) begin
      addr  <= (i_exp == NM1) ? '0 : i_exp;
      steps <= (j_exp == NM1) ? '0 : j_exp;
      busy  <= 1'b1;
      done  <= 1'b0;
    end else if (busy) begin
      if (steps == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        addr  <= (addr == NM1 - 1'b1) ? '0 : addr + 1'b1;
        steps <= steps - 1'b1;
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

  assign exp_out = addr;
  assign d       = ALOG[addr];
endmodule
