// tb_gf_sqrt: exhaustive check of the square root: sqrt(B)^2 = B for every B,
// plus the rows of the inverse matrix of the GF(2^4) example. A second
// instance in GF(2^8) (p = x^8 + x^4 + x^3 + x^2 + 1) checks the generic case.
module tb_gf_sqrt;
  import gf_ref_pkg::*;
  logic [3:0] b, d;
  logic [7:0] b8, d8;
  int checks = 0, failures = 0;

  gf_sqrt #(.M(4), .P(5'b10011)) dut (.b(b), .d(d));
  gf_sqrt #(.M(8), .P(9'h11d)) dut8 (.b(b8), .d(d8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      b = 4'(x);
      #1;
      checks++;
      if (rmul(int'(d), int'(d), 4, 'h13) != x) begin
        failures++;
        $display("sqrt(%h) = %h is wrong", x, d);
      end
      checks++;
      if (d != {b[3], b[1], b[2] ^ b[3], b[0] ^ b[1]}) failures++;
    end
    for (int x = 0; x < 256; x++) begin
      b8 = 8'(x);
      #1;
      checks++;
      if (rmul(int'(d8), int'(d8), 8, 'h11d) != x) begin
        failures++;
        $display("sqrt8(%h) = %h is wrong", x, d8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
