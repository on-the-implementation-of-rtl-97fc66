// tb_gf_ser_std_mul: general-purpose bit-serial multiplier streaming random
// words back to back at one bit per clock. A word n is sent in slot n, B word n
// in slot n+1 (A leads by m clocks). The product must appear MSB first on d_out
// right after clock edge 2m+1+n*m (counting the first edge after reset as 0),
// marked by d_first. The first half of the words use p(x) = x^4 + x + 1, the
// second half x^4 + x^3 + 1 (p_in changed at a slot boundary).
module tb_gf_ser_std_mul;
  import gf_ref_pkg::*;
  localparam int M = 4;
  localparam int NW = 400;
  logic clk = 0, rst_n = 0, a_in = 0, b_in = 0, d_out, d_first;
  logic [M-1:0] p_in = 4'b0011, d_word;
  int checks = 0, failures = 0;
  int av [NW];
  int bv [NW];
  int pv [NW];

  gf_ser_std_mul #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NW * M + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, bit_i, got, n;
    for (int i = 0; i < NW; i++) begin
      av[i] = $urandom_range(15);
      bv[i] = $urandom_range(15);
      pv[i] = (i < NW / 2) ? 'h13 : 'h19;
    end
    @(negedge clk);
    rst_n = 1;
    got = 0;
    for (int e = 0; e < (NW + 3) * M; e++) begin
      w     = e / M;
      bit_i = M - 1 - (e % M);
      a_in <= (w < NW) ? av[w][bit_i] : 1'b0;
      b_in <= (w >= 1 && w - 1 < NW) ? bv[w-1][bit_i] : 1'b0;
      // p_in is taken at the start of each A slot's following slot
      p_in <= (w >= 1 && w - 1 < NW) ? 4'(pv[w-1]) : 4'(pv[0]);
      @(posedge clk);
      #1;
      if (e >= 2 * M + 1 && (e - 2 * M - 1) / M < NW) begin
        n = (e - 2 * M - 1) / M;
        if ((e - 2 * M - 1) % M == 0) begin
          checks++;
          if (!d_first) begin
            failures++;
            $display("d_first missing after edge %0d", e);
          end
          checks++;
          if (int'(d_word) != rmul(av[n], bv[n], M, pv[n])) begin
            failures++;
            $display("word %0d: %h * %h = %h, expected %h", n, av[n], bv[n], d_word,
                     rmul(av[n], bv[n], M, pv[n]));
          end
          got = 0;
        end
        got = (got << 1) | int'(d_out);
        if ((e - 2 * M - 1) % M == M - 1) begin
          checks++;
          if (got != rmul(av[n], bv[n], M, pv[n])) begin
            failures++;
            $display("word %0d serial out %h", n, got);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
