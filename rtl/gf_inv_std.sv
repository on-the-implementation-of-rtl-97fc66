// gf_inv_std: sequential standard-basis inverter, beta^-1 = beta^(2^m - 2).
//
// Because beta^(2^m - 1) = 1 for every nonzero beta, the inverse is the power
// 2^m - 2 = binary 11...10. A loop of one general multiplier (gf_par_std_mul),
// one squarer (gf_square) and an m-bit register R computes
//   R <- (R * beta)^2,     R starting at 1,
// giving beta^2, beta^6, beta^14, ..., beta^(2^k - 2) after k clocks; after
// m-1 clocks R = beta^-1. A zero input gives zero.
//
// Interface and timing:
//   start : R <= 1 and the operand register <= beta; busy rises.
//   busy  : high for the m-1 computing clocks.
//   done  : one-clock pulse in the clock after the last step; inv is valid
//           from then until the next start.
// The multiply-square loop and its m-1 clocks follow the document; the
// start/busy/done handshake is this design's choice.
module gf_inv_std #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] beta,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] inv
);
  localparam int CW = $clog2(M) + 1;

  logic [M-1:0]  r, b_r, prod, sq;
  logic [CW-1:0] cnt;

  gf_par_std_mul #(.M(M), .P(P)) u_mul (.a(r), .b(b_r), .d(prod));
  gf_square      #(.M(M), .P(P)) u_sq  (.b(prod), .d(sq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      b_r  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start) begin
      r    <= M'(1);
      b_r  <= beta;
      cnt  <= CW'(M - 1);
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      r   <= sq;
      cnt <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy <= 1'b0;
        done <= 1'b1;
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

  assign inv = r;
endmodule
