// tb_gf_inv_std: sequential standard-basis inverter in GF(2^4) and GF(2^8).
// Every element is inverted; the result must satisfy beta * inv = 1 (reference
// product), zero must give zero, and done must come exactly m-1 clocks after
// start.
module tb_gf_inv_std;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, start8 = 0, busy8, done8;
  logic [3:0] beta = 0, inv;
  logic [7:0] beta8 = 0, inv8;
  int checks = 0, failures = 0;

  gf_inv_std #(.M(4), .P(5'b10011)) dut (.clk, .rst_n, .start, .beta, .busy, .done, .inv);
  gf_inv_std #(.M(8), .P(9'h11d)) dut8 (.clk, .rst_n, .start(start8), .beta(beta8),
                                        .busy(busy8), .done(done8), .inv(inv8));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int x = 0; x < 16; x++) begin
      beta  <= 4'(x);
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
      if (cyc != 3) begin
        failures++;
        $display("inv_std took %0d clocks", cyc);
      end
      checks++;
      if (int'(inv) != rinv(x, 4, 'h13)) begin
        failures++;
        $display("inv_std(%h) = %h, expected %h", x, inv, rinv(x, 4, 'h13));
      end
    end
    for (int x = 0; x < 256; x++) begin
      beta8  <= 8'(x);
      start8 <= 1;
      @(posedge clk);
      start8 <= 0;
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (!done8 && cyc < 100);
      checks++;
      if (cyc != 7 || int'(inv8) != rinv(x, 8, 'h11d)) begin
        failures++;
        $display("inv_std8(%h) = %h after %0d clocks", x, inv8, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
