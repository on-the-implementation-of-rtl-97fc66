// gf_ser_std_mul: general-purpose bit-serial standard-basis multiplier,
// D = A*B mod p(x), streaming one bit per clock.
//
// How it works: m identical cells, cell j for coefficient j. Each cell holds
// a latch for a_j, one flip-flop r_j and the logic
//   r_j <= r_{j-1} ^ (b & a_j) ^ (fb & p_j),      r_{-1} = 0, fb = r_{m-1}
// (two ANDs and a 3-input XOR). One step computes R <- R*x mod p(x) + b*A,
// so feeding B most significant bit first leaves A*B mod p(x) in R after
// m steps (Horner's rule). The last cell's output fb is broadcast to all
// cells and performs the modulo reduction. p_j are the low coefficients of
// p(x), taken from the p_in port; tie it to a constant for a fixed field.
//
// Streaming and timing: a free-running counter divides time into m-clock
// word slots, slot 0 starting at the first clock after reset.
//   * a_in: word n is sent MSB first during slot n into a shift register;
//     it is copied into the cell latches at the start of slot n+1.
//   * b_in: word n is sent MSB first during slot n+1 (A leads B by m clocks).
//     It passes one input flip-flop, so the cells use it one clock later.
//   * The product of word n is complete after m steps and is parallel
//     loaded into the output register, then shifted out MSB first on d_out
//     during the clocks 2m+2 .. 3m+1 counted from the start of slot n;
//     d_first marks its MSB.
// Throughput is one bit per clock on every port; each product takes m steps.
// The cell equations, the A lead of m clocks and the output register follow
// the document; the slot counter, the clear of R at the start of each word and
// the exact clock offsets are this design's choices.
module gf_ser_std_mul #(
  parameter int M = gf_pkg::DEF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_in,
  input  logic         b_in,
  input  logic [M-1:0] p_in,
  output logic         d_out,
  output logic         d_first,
  output logic [M-1:0] d_word
);
  localparam int CW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0] cnt;        // position inside the current m-clock slot
  logic [M-1:0]  a_sr;       // serial-in A shift register
  logic [M-1:0]  a_lat;      // a_j latches inside the cells
  logic [M-1:0]  p_reg;      // p_j register
  logic          b_q;        // B input flip-flop
  logic [M-1:0]  r;          // cell flip-flops r_j
  logic [M-1:0]  r_next;
  logic [M-1:0]  d_sr;       // output register
  logic          first_step; // the cells start a new product this clock
  logic          d_first_q;

  assign first_step = (cnt == CW'(1 % M));

  // cell logic
  always_comb begin
    logic fb;
    fb = first_step ? 1'b0 : r[M-1];
    for (int j = 0; j < M; j++) begin
      logic prev;
      prev = (j == 0 || first_step) ? 1'b0 : r[(j == 0) ? 0 : j-1];
      r_next[j] = prev ^ (b_q & a_lat[j]) ^ (fb & p_reg[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      a_sr      <= '0;
      a_lat     <= '0;
      p_reg     <= '0;
      b_q       <= 1'b0;
      r         <= '0;
      d_sr      <= '0;
      d_first_q <= 1'b0;
    end else begin
      cnt  <= (cnt == CW'(M - 1)) ? '0 : cnt + 1'b1;
      a_sr <= {a_sr[M-2:0], a_in};
      b_q  <= b_in;
      if (cnt == '0) begin
        a_lat <= a_sr;
        p_reg <= p_in;
      end
      r <= r_next;
      if (first_step) begin
        d_sr      <= r;
        d_first_q <= 1'b1;
      end else begin
        d_sr      <= {d_sr[M-2:0], 1'b0};
        d_first_q <= 1'b0;
      end
    end
  end

  assign d_out   = d_sr[M-1];
  assign d_first = d_first_q;
  assign d_word  = d_sr;
endmodule
