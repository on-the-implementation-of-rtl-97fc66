// tb_gf256_nb: the GF(2^8) normal-basis case, p(x) = x^8 + x^5 + x^3 + x + 1,
// for which a normal basis with a small function f exists. The normal element
// is beta = alpha^127, the smallest power of alpha whose f block has the
// minimum of 21 product terms for m = 8 (a count the testbench checks). The
// bit-parallel and bit-serial Massey-Omura multipliers and the normal-basis
// inverter are run on random operands against the reference package.
module tb_gf256_nb;
  import gf_ref_pkg::*;
  localparam int M = 8;
  localparam int PP = 'h12B;
  localparam int NBE = 127;

  logic clk = 0, rst_n = 0, ld = 0, a_in = 0, b_in = 0, d_out;
  logic start = 0, busy, done;
  logic [M-1:0] a = 0, b = 0, d, beta = 0, inv;
  int checks = 0, failures = 0;

  gf_par_nb_mul #(.M(M), .P(9'h12B), .NB_EXP(NBE)) u_par (.a, .b, .d);
  gf_ser_nb_mul #(.M(M), .P(9'h12B), .NB_EXP(NBE)) u_ser (.clk, .rst_n, .ld, .a_in, .b_in, .d_out);
  gf_inv_nb     #(.M(M), .P(9'h12B), .NB_EXP(NBE)) u_inv (.clk, .rst_n, .start, .beta, .busy, .done, .inv);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // number of product terms of f, counted independently
  function automatic int f_terms();
    int n = 0, vi, vj;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        vi = nb_to_std(1 << i, NBE, M, PP);
        vj = nb_to_std(1 << j, NBE, M, PP);
        if ((std_to_nb(rmul(vi, vj, M, PP), NBE, M, PP) >> (M - 1)) & 1) n++;
      end
    return n;
  endfunction

  initial begin
    int x, y, e, got, n1;
    int tbl [256];   // standard -> normal coordinates
    for (int c = 0; c < 256; c++) tbl[nb_to_std(c, NBE, M, PP)] = c;
    checks++;
    n1 = f_terms();
    if (n1 != 21) begin
      failures++;
      $display("f has %0d terms", n1);
    end
    // the f block of the design must be exactly the reference: unit vectors
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        a = M'(1 << i);
        b = M'(1 << j);
        #1;
        checks++;
        if (int'(d) != tbl[rmul(nb_to_std(1 << i, NBE, M, PP), nb_to_std(1 << j, NBE, M, PP), M, PP)])
          failures++;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      x = $urandom_range(255);
      y = $urandom_range(255);
      e = tbl[rmul(nb_to_std(x, NBE, M, PP), nb_to_std(y, NBE, M, PP), M, PP)];
      a <= M'(x);
      b <= M'(y);
      for (int i = M - 1; i >= 0; i--) begin
        ld <= 1; a_in <= x[i]; b_in <= y[i];
        @(posedge clk);
      end
      ld <= 0;
      got = 0;
      for (int k = M - 1; k >= 0; k--) begin
        #1;
        got[k] = d_out;
        @(posedge clk);
      end
      #1;
      checks++;
      if (int'(d) != e || got != e) begin
        failures++;
        $display("GF256 nb %h * %h: par %h ser %h expected %h", x, y, d, got, e);
      end
      beta  <= M'(x);
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk);
      while (!done) @(posedge clk);
      #1;
      checks++;
      if (int'(inv) != tbl[rinv(nb_to_std(x, NBE, M, PP), M, PP)]) begin
        failures++;
        $display("GF256 nb inv %h = %h", x, inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
