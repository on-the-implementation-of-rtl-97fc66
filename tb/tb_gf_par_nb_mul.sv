// tb_gf_par_nb_mul: exhaustive check of the bit-parallel Massey-Omura multiplier
// in GF(2^4). Operands are random normal-basis vectors; the expected product is
// obtained by converting to the standard basis, multiplying there and
// converting back, all with the reference package. A GF(2^5) instance
// (p = x^5 + x^2 + 1, beta = alpha^3) checks another field.
module tb_gf_par_nb_mul;
  import gf_ref_pkg::*;
  logic [3:0] a, b, d;
  logic [4:0] a5, b5, d5;
  int checks = 0, failures = 0;

  gf_par_nb_mul #(.M(4), .P(5'b10011), .NB_EXP(7)) dut (.a(a), .b(b), .d(d));
  gf_par_nb_mul #(.M(5), .P(6'b100101), .NB_EXP(3)) dut5 (.a(a5), .b(b5), .d(d5));

  function automatic int nb_ref(int x, int y, int e, int m, int p);
    return std_to_nb(rmul(nb_to_std(x, e, m, p), nb_to_std(y, e, m, p), m, p), e, m, p);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // beta = alpha^7 must give a basis: every vector converts back
    checks++;
    if (std_to_nb(5, 7, 4, 'h13) < 0) failures++;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        checks++;
        if (int'(d) != nb_ref(x, y, 7, 4, 'h13)) begin
          failures++;
          $display("nb %h * %h = %h, expected %h", x, y, d, nb_ref(x, y, 7, 4, 'h13));
        end
      end
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a5 = 5'(x);
        b5 = 5'(y);
        #1;
        checks++;
        if (int'(d5) != nb_ref(x, y, 3, 5, 'h25)) failures++;
      end
    // all-ones is the unit element in a normal basis
    a = 4'hF;
    b = 4'h9;
    #1;
    checks++;
    if (d != 4'h9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
