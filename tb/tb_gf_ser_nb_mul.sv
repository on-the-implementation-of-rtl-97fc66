// tb_gf_ser_nb_mul: bit-serial Massey-Omura multiplier, GF(2^4), beta = alpha^7.
// For every operand pair: shift A and B in (m clocks, MSB position first),
// then read d_{m-1}, d_{m-2}, ..., d_0 on d_out in the next m clocks and compare
// with the product formed in the standard basis by the reference package.
module tb_gf_ser_nb_mul;
  import gf_ref_pkg::*;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, ld = 0, a_in = 0, b_in = 0, d_out;
  int checks = 0, failures = 0;

  gf_ser_nb_mul #(.M(M), .P(5'b10011), .NB_EXP(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_d, got, cyc;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        exp_d = std_to_nb(rmul(nb_to_std(x, 7, M, 'h13), nb_to_std(y, 7, M, 'h13), M, 'h13), 7, M, 'h13);
        for (int i = M - 1; i >= 0; i--) begin
          ld   <= 1;
          a_in <= x[i];
          b_in <= y[i];
          @(posedge clk);
        end
        ld <= 0;
        got = 0;
        cyc = 0;
        for (int k = M - 1; k >= 0; k--) begin
          #1;
          got[k] = d_out;
          cyc++;
          @(posedge clk);
        end
        checks++;
        if (got != exp_d || cyc != M) begin
          failures++;
          $display("ser nb %h * %h = %h, expected %h", x, y, got, exp_d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
