// tb_gf_square: exhaustive check of the GF(2^4) squarer against the reference
// product B*B, plus the worked matrix rows of the p = x^4 + x + 1 example.
module tb_gf_square;
  import gf_ref_pkg::*;
  localparam int M = 4;
  localparam int PP = 'h13;
  logic [M-1:0] b, d;
  int checks = 0, failures = 0;

  gf_square #(.M(M), .P(5'b10011)) dut (.b(b), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      b = M'(x);
      #1;
      checks++;
      if (int'(d) != rmul(x, x, M, PP)) begin
        failures++;
        $display("square(%h) = %h, expected %h", x, d, rmul(x, x, M, PP));
      end
      // rows of [T]: d0 = b0+b2, d1 = b2, d2 = b1+b3, d3 = b3
      checks++;
      if (d != {b[3], b[1] ^ b[3], b[2], b[0] ^ b[2]}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
