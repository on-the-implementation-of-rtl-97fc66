// tb_gf_dual_mul: dual-basis multiplier, GF(2^4), p = x^4 + x + 1.
// For every Z and G: the dual-basis coordinates z'_k = Tr(Z alpha^k) are shifted
// in (z'_0 first), G is loaded, and m steps must give w'_k = Tr(Z G alpha^k),
// i.e. the dual-basis coordinates of Z*G, all worked out by the reference package.
module tb_gf_dual_mul;
  import gf_ref_pkg::*;
  localparam int M = 4;
  localparam int PP = 'h13;
  logic clk = 0, rst_n = 0, z_ld = 0, z_in = 0, g_ld = 0, en = 0, w;
  logic [M-1:0] g = '0;
  int checks = 0, failures = 0;

  gf_dual_mul #(.M(M), .P(5'b10011)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zd, wexp, got;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int z = 0; z < 16; z++)
      for (int gg = 0; gg < 16; gg++) begin
        zd   = to_dual(z, M, PP);
        wexp = to_dual(rmul(z, gg, M, PP), M, PP);
        g    <= M'(gg);
        g_ld <= 1;
        for (int k = 0; k < M; k++) begin
          z_ld <= 1;
          z_in <= zd[k];
          @(posedge clk);
          g_ld <= 0;
        end
        z_ld <= 0;
        got = 0;
        for (int k = 0; k < M; k++) begin
          en <= 1;
          @(posedge clk);
          #1;
          got[k] = w;
        end
        en <= 0;
        checks++;
        if (got != wexp) begin
          failures++;
          $display("dual Z=%h G=%h: w'=%h, expected %h", z, gg, got, wexp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
