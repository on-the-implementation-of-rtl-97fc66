// tb_gf_par_andxor_mul: exhaustive check of the bit-parallel multiplier in GF(2^4)
// (p = x^4 + x + 1) and a random check in GF(2^8) (p = x^8 + x^4 + x^3 + x^2 + 1),
// both against the reference product.
module tb_gf_par_andxor_mul;
  import gf_ref_pkg::*;
  logic [3:0] a, b, d;
  logic [7:0] a8, b8, d8;
  int checks = 0, failures = 0;

  gf_par_andxor_mul #(.M(4), .P(5'b10011)) dut (.a(a), .b(b), .d(d));
  gf_par_andxor_mul #(.M(8), .P(9'h11d)) dut8 (.a(a8), .b(b8), .d(d8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        checks++;
        if (int'(d) != rmul(x, y, 4, 'h13)) begin
          failures++;
          $display("%h * %h = %h, expected %h", x, y, d, rmul(x, y, 4, 'h13));
        end
      end
    for (int n = 0; n < 2000; n++) begin
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      #1;
      checks++;
      if (int'(d8) != rmul(int'(a8), int'(b8), 8, 'h11d)) begin
        failures++;
        $display("GF256 %h * %h = %h", a8, b8, d8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
