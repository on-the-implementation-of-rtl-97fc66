// tb_gf_inv_shift: shift-register inverter in GF(2^4) and GF(2^8). Every element
// is inverted; the result must be the reference inverse and the number of
// shifts must equal the discrete log distance: for beta = alpha^k the inverter
// needs (2^m - 1 - k) mod (2^m - 1) shifts, never more than 2^m - 2.
// Then every num / beta pair in GF(2^4) checks the multiplication-inversion.
module tb_gf_inv_shift;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, start8 = 0, busy8, done8;
  logic [3:0] beta = 0, num = 1, inv;
  logic [4:0] cycles;
  logic [7:0] beta8 = 0, inv8;
  logic [8:0] cycles8;
  int checks = 0, failures = 0;

  gf_inv_shift #(.M(4), .P(5'b10011)) dut (.*);
  gf_inv_shift #(.M(8), .P(9'h11d)) dut8 (.clk, .rst_n, .start(start8), .beta(beta8), .num(8'd1),
      .busy(busy8), .done(done8), .inv(inv8), .cycles(cycles8));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_n, x, maxc;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    maxc = 0;
    for (int k = 0; k < 15; k++) begin
      x = rpow(2, k, 4, 'h13);
      beta  <= 4'(x);
      start <= 1;
      @(posedge clk);
      start <= 0;
      wait_n = 0;
      do begin
        @(posedge clk);
        wait_n++;
        #1;
      end while (!done && wait_n < 100);
      checks++;
      if (int'(inv) != rinv(x, 4, 'h13) || int'(cycles) != (15 - k) % 15) begin
        failures++;
        $display("inv_shift(alpha^%0d) = %h after %0d shifts", k, inv, cycles);
      end
      if (int'(cycles) > maxc) maxc = int'(cycles);
    end
    checks++;
    if (maxc != 14) failures++;
    // zero operand
    beta  <= 4'h0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    #1;
    checks++;
    if (!done || inv != 4'h0) failures++;
    for (int u = 0; u < 16; u++)
      for (int y = 1; y < 16; y++) begin
        num   <= 4'(u);
        beta  <= 4'(y);
        start <= 1;
        @(posedge clk);
        start <= 0;
        wait_n = 0;
        do begin
          @(posedge clk);
          wait_n++;
          #1;
        end while (!done && wait_n < 100);
        checks++;
        if (int'(inv) != rmul(u, rinv(y, 4, 'h13), 4, 'h13)) begin
          failures++;
          $display("inv_shift %h / %h = %h", u, y, inv);
        end
      end
    for (int y = 1; y < 256; y++) begin
      beta8  <= 8'(y);
      start8 <= 1;
      @(posedge clk);
      start8 <= 0;
      wait_n = 0;
      do begin
        @(posedge clk);
        wait_n++;
        #1;
      end while (!done8 && wait_n < 1000);
      checks++;
      if (int'(inv8) != rinv(y, 8, 'h11d) || int'(cycles8) > 254) begin
        failures++;
        $display("inv_shift8(%h) = %h", y, inv8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
