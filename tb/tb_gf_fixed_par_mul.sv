// tb_gf_fixed_par_mul: exhaustive check of D = alpha^6 * B in GF(2^4) against the
// reference product and against the transformation matrix rows of the example.
module tb_gf_fixed_par_mul;
  import gf_ref_pkg::*;
  logic [3:0] b, d;
  int checks = 0, failures = 0;

  gf_fixed_par_mul dut (.b(b), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (rpow(2, 6, 4, 'h13) != 'hC) failures++;   // alpha^6 = x^3 + x^2
    for (int x = 0; x < 16; x++) begin
      b = 4'(x);
      #1;
      checks++;
      if (int'(d) != rmul('hC, x, 4, 'h13)) begin
        failures++;
        $display("alpha^6 * %h = %h, expected %h", x, d, rmul('hC, x, 4, 'h13));
      end
      checks++;
      if (d != {b[0] ^ b[1] ^ b[3], b[0] ^ b[2], b[1] ^ b[3], b[1] ^ b[2]}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
