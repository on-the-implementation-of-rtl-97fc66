// tb_gf_fixed_ser_mul: fixed-coefficient bit-serial multiplier, D = (x^3+x^2)*B
// in GF(2^4). For every B: clear, shift B in MSB first for m clocks, compare the
// register with the reference product, then shift it out with the control
// input high and compare the serial bits (MSB first).
module tb_gf_fixed_ser_mul;
  import gf_ref_pkg::*;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, clear = 0, shift_out = 0, b_in = 0, d_out;
  logic [M-1:0] d;
  int checks = 0, failures = 0;

  gf_fixed_ser_mul dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, got;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 2; rep++)
      for (int y = 0; y < 16; y++) begin
        e = rmul('hC, y, M, 'h13);
        clear <= 1;
        @(posedge clk);
        clear <= 0;
        for (int i = M - 1; i >= 0; i--) begin
          b_in <= y[i];
          @(posedge clk);
        end
        #1;
        checks++;
        if (int'(d) != e) begin
          failures++;
          $display("fixed ser %h: d=%h expected %h", y, d, e);
        end
        got = 0;
        shift_out <= 1;
        b_in <= 1'($urandom);   // ignored while shifting out
        for (int i = M - 1; i >= 0; i--) begin
          #1;
          got[i] = d_out;
          @(posedge clk);
        end
        shift_out <= 0;
        checks++;
        if (got != e) begin
          failures++;
          $display("fixed ser %h: shifted out %h expected %h", y, got, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
