// gf_inv_nb: sequential normal-basis inverter,
// beta^-1 = beta^2 * beta^4 * ... * beta^(2^(m-1)).
//
// The exponent 2^m - 2 is the sum 2 + 4 + ... + 2^(m-1), so the inverse is
// the product of the successive squares of beta. In the normal basis a
// square is a one-position rotation, so a rotating register S steps through
// beta^2, beta^4, ... at no gate cost, while one bit-parallel Massey-Omura
// multiplier (gf_par_nb_mul) accumulates R <- R * S. R starts at 1, which in a
// normal basis is the all-ones vector. After m-1 clocks R = beta^-1; zero in
// gives zero out.
//
// Interface and timing: as gf_inv_std (start, busy for m-1 clocks, done
// pulse, inv valid from done until the next start); beta and inv are
// normal-basis coordinates.
// The product of squares and its m-1 clocks follow the document; holding
// the squares in a separate rotating register and the handshake are this
// design's reading of the circuit.
module gf_inv_nb #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter int unsigned NB_EXP = 7
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

  logic [M-1:0]  r, s, prod;
  logic [CW-1:0] cnt;

  gf_par_nb_mul #(.M(M), .P(P), .NB_EXP(NB_EXP)) u_mul (.a(r), .b(s), .d(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      s    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start) begin
      r    <= '1;
      s    <= {beta[M-2:0], beta[M-1]};
      cnt  <= CW'(M - 1);
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      r   <= prod;
      s   <= {s[M-2:0], s[M-1]};
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
