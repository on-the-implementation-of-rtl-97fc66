// tb_gf_inv_nb: sequential normal-basis inverter in GF(2^4), beta = alpha^7.
// Every element (normal-basis coordinates) is inverted; the result converted
// to the standard basis must be the reference inverse, zero gives zero, and
// done must come exactly m-1 clocks after start.
module tb_gf_inv_nb;
  import gf_ref_pkg::*;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] beta = 0, inv;
  int checks = 0, failures = 0;

  gf_inv_nb #(.M(M), .P(5'b10011), .NB_EXP(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, e;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int x = 0; x < 16; x++) begin
      e = std_to_nb(rinv(nb_to_std(x, 7, M, 'h13), M, 'h13), 7, M, 'h13);
      beta  <= M'(x);
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (!done && cyc < 100);
      checks++;
      if (cyc != M - 1) begin
        failures++;
        $display("inv_nb took %0d clocks", cyc);
      end
      checks++;
      if (int'(inv) != e) begin
        failures++;
        $display("inv_nb(%h) = %h, expected %h", x, inv, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
