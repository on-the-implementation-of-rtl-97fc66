// tb_gf_par_add: bit-parallel adder, GF(2^4): one clock gives A xor B; with
// the enable low the register holds.
module tb_gf_par_add;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] a = 0, b = 0, d;
  int checks = 0, failures = 0;

  gf_par_add #(.M(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] last;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a  <= 4'(x);
        b  <= 4'(y);
        en <= 1;
        @(posedge clk);
        #1;
        checks++;
        if (d != 4'(x ^ y)) failures++;
        last = d;
        en <= 0;
        a  <= ~a;
        @(posedge clk);
        #1;
        checks++;
        if (d != last) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
