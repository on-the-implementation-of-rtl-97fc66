// tb_gf_log_alu: log/antilog table unit in GF(2^4) (exhaustive) and GF(2^8)
// (random): multiplication, inversion and division against the reference
// arithmetic, one clock latency, zero operands and the error flag.
module tb_gf_log_alu;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, err, err8;
  logic [1:0] op = 0, op8 = 0;
  logic [3:0] a = 0, b = 0, d;
  logic [7:0] a8 = 0, b8 = 0, d8;
  int checks = 0, failures = 0;

  gf_log_alu #(.M(4), .P(5'b10011)) dut (.*);
  gf_log_alu #(.M(8), .P(9'h11d)) dut8 (.clk, .rst_n, .op(op8), .a(a8), .b(b8), .d(d8), .err(err8));

  always #5 clk = ~clk;

  function automatic int expect_res(int o, int x, int y, int m, int p);
    case (o)
      0: return rmul(x, y, m, p);
      1: return rinv(y, m, p);
      default: return (y == 0) ? 0 : rmul(x, rinv(y, m, p), m, p);
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x8, y8, o8;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int o = 0; o < 3; o++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          op <= 2'(o);
          a  <= 4'(x);
          b  <= 4'(y);
          x8 = $urandom_range(255);
          y8 = $urandom_range(255);
          o8 = $urandom_range(2);
          op8 <= 2'(o8);
          a8  <= 8'(x8);
          b8  <= 8'(y8);
          @(posedge clk);
          #1;
          checks++;
          if (int'(d) != expect_res(o, x, y, 4, 'h13)) begin
            failures++;
            $display("log_alu op%0d %h,%h = %h", o, x, y, d);
          end
          checks++;
          if (err != (o != 0 && y == 0)) failures++;
          checks++;
          if (int'(d8) != expect_res(o8, x8, y8, 8, 'h11d)) begin
            failures++;
            $display("log_alu8 op%0d %h,%h = %h", o8, x8, y8, d8);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
