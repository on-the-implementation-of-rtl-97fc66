// tb_gf_log_cnt_mul: counting multiplier in GF(2^4): for every pair of
// exponents i, j the result must be alpha^((i+j) mod 15) from the reference
// arithmetic, with done j + 1 clocks after start (j counting clocks and one
// clock to see that the count is exhausted).
module tb_gf_log_cnt_mul;
  import gf_ref_pkg::*;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] i_exp = 0, j_exp = 0, d, exp_out;
  int checks = 0, failures = 0;

  gf_log_cnt_mul #(.M(M), .P(5'b10011)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 15; i++)
      for (int j = 0; j < 15; j++) begin
        i_exp <= M'(i);
        j_exp <= M'(j);
        start <= 1;
        @(posedge clk);
        start <= 0;
        n = 0;
        do begin
          @(posedge clk);
          n++;
          #1;
        end while (!done && n < 100);
        checks++;
        if (int'(d) != rpow(2, i + j, M, 'h13) || int'(exp_out) != (i + j) % 15) begin
          failures++;
          $display("alpha^%0d * alpha^%0d = %h (exp %0d)", i, j, d, exp_out);
        end
        checks++;
        if (n != j + 1) begin
          failures++;
          $display("counting %0d steps took %0d clocks", j, n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
