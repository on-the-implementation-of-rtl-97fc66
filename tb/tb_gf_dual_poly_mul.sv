// tb_gf_dual_poly_mul: polynomial multiplier Z*G(x) with 4 coefficients in GF(2^4).
// Random Z and G_0..G_3; after m steps output i must have produced the dual-basis
// coordinates of Z*G_i for every i (reference package).
module tb_gf_dual_poly_mul;
  import gf_ref_pkg::*;
  localparam int M = 4;
  localparam int PP = 'h13;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0, z_ld = 0, z_in = 0, g_ld = 0, en = 0;
  logic [NC-1:0][M-1:0] g = '0;
  logic [NC-1:0] w;
  int checks = 0, failures = 0;

  gf_dual_poly_mul #(.M(M), .P(5'b10011), .NCOEF(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z, zd;
    int got [NC];
    int gv [NC];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      z  = $urandom_range(15);
      zd = to_dual(z, M, PP);
      for (int i = 0; i < NC; i++) begin
        gv[i] = $urandom_range(15);
        g[i] <= M'(gv[i]);
        got[i] = 0;
      end
      g_ld <= 1;
      for (int k = 0; k < M; k++) begin
        z_ld <= 1;
        z_in <= zd[k];
        @(posedge clk);
        g_ld <= 0;
      end
      z_ld <= 0;
      for (int k = 0; k < M; k++) begin
        en <= 1;
        @(posedge clk);
        #1;
        for (int i = 0; i < NC; i++) got[i][k] = w[i];
      end
      en <= 0;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (got[i] != to_dual(rmul(z, gv[i], M, PP), M, PP)) begin
          failures++;
          $display("poly Z=%h G%0d=%h: got %h", z, i, gv[i], got[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
