// tb_gf_ser_add: bit-serial adder, GF(2^4) exhaustive and GF(2^8) random: after
// m shift clocks the result register must hold A xor B, and not before.
module tb_gf_ser_add;
  logic clk = 0, rst_n = 0, ld = 0, en = 0;
  logic [3:0] a = 0, b = 0, d;
  int checks = 0, failures = 0;

  gf_ser_add #(.M(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a  <= 4'(x);
        b  <= 4'(y);
        ld <= 1;
        @(posedge clk);
        ld <= 0;
        en <= 1;
        repeat (4) @(posedge clk);
        en <= 0;
        #1;
        checks++;
        if (d != 4'(x ^ y)) begin
          failures++;
          $display("ser_add %h + %h = %h", x, y, d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
