// tb_gf_ops_top: end-to-end test of the whole unit library at its default
// size, GF(2^4) with p = x^4 + x + 1 and normal element alpha^7.
//
// Each round draws a, b and computes q = a / b several independent ways, then
// cross-checks every unit against the others and against the reference
// package:
//   1. b^-1 by the multiply-square inverter, the shift-register inverter and
//      the normal-basis inverter (b converted to normal-basis coordinates);
//   2. q = a * b^-1 by both bit-parallel multipliers and by the streaming
//      bit-serial multiplier; q by the log/antilog unit (division);
//   3. the parallel and serial adders must give q + q' = 0 for every pair;
//   4. q in the dual basis by the dual-basis multiplier (Z = a, G = b^-1) and,
//      with G_i = b^-1 * alpha^i, by the polynomial multiplier;
//   4a. a*b by the log unit and by counting through the antilog table;
//   5. a*b in the normal basis by the serial and parallel Massey-Omura units;
//   6. alpha^6 * a by both fixed-coefficient multipliers, a^2 and sqrt(a).
// Mechanisms counted (each must occur): modulo feedback in the serial
// multiplier, exponent wrap-around in the log unit, a zero operand, a
// shift-register inversion of the full 2^m - 2 shifts, a one-clock inversion
// (beta = 1), the shift-out mode of the fixed serial multiplier and a division
// by the shift-register circuit (A started at a instead of 1) and a wrap of
// the modulo-(2^m - 1) address counter of the counting multiplier.
module tb_gf_ops_top;
  import gf_ref_pkg::*;
  localparam int M = 4;
  localparam int PP = 'h13;
  localparam int NBE = 7;
  localparam int NC = 4;
  localparam int ROUNDS = 300;

  logic clk = 0, rst_n = 0;
  logic sadd_ld = 0, sadd_en = 0, padd_en = 0;
  logic [M-1:0] sadd_a = 0, sadd_b = 0, sadd_d, padd_a = 0, padd_b = 0, padd_d;
  logic smul_a_in = 0, smul_b_in = 0, smul_d_out, smul_d_first;
  logic [M-1:0] smul_p = 4'b0011, smul_d_word;
  logic fsmul_clear = 0, fsmul_shift_out = 0, fsmul_b_in = 0, fsmul_d_out;
  logic [M-1:0] fsmul_d;
  logic pmul_en = 0, lin_en = 0, pnb_en = 0;
  logic [M-1:0] pmul_a = 0, pmul_b = 0, pmul_d_array, pmul_d_andxor;
  logic [M-1:0] lin_b = 0, lin_d_const, lin_d_square, lin_d_sqrt;
  logic snb_ld = 0, snb_a_in = 0, snb_b_in = 0, snb_d_out;
  logic [M-1:0] pnb_a = 0, pnb_b = 0, pnb_d;
  logic dual_z_ld = 0, dual_z_in = 0, dual_g_ld = 0, dual_en = 0, dual_w;
  logic [M-1:0] dual_g = 0;
  logic dpoly_z_ld = 0, dpoly_z_in = 0, dpoly_g_ld = 0, dpoly_en = 0;
  logic [NC-1:0][M-1:0] dpoly_g = '0;
  logic [NC-1:0] dpoly_w;
  logic sinv_start = 0, sinv_busy, sinv_done;
  logic [M-1:0] sinv_beta = 0, sinv_inv;
  logic ninv_start = 0, ninv_busy, ninv_done;
  logic [M-1:0] ninv_beta = 0, ninv_inv;
  logic shinv_start = 0, shinv_busy, shinv_done;
  logic [M-1:0] shinv_beta = 0, shinv_num = 1, shinv_inv;
  logic [M:0] shinv_cycles;
  logic [1:0] log_op = 0;
  logic [M-1:0] log_a = 0, log_b = 0, log_d;
  logic log_err;
  logic lcnt_start = 0, lcnt_busy, lcnt_done;
  logic [M-1:0] lcnt_i_exp = 0, lcnt_j_exp = 0, lcnt_d, lcnt_exp;

  gf_ops_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reduce = 0, n_wrap = 0, n_zero = 0, n_maxshift = 0, n_one = 0, n_shiftout = 0, n_divide = 0, n_cntwrap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry-less product without reduction, to see when feedback is needed
  function automatic int clmul(int x, int y);
    int r = 0;
    for (int i = 0; i < M; i++) if ((y >> i) & 1) r = r ^ (x << i);
    return r;
  endfunction

  // ---- unit drivers ----
  task automatic run_inv(input int beta, output int inv_s, output int inv_sh,
                         output int inv_n, output int shifts);
    int n = 0;
    sinv_beta  <= M'(beta);
    shinv_beta <= M'(beta);
    ninv_beta  <= M'(std_to_nb(beta, NBE, M, PP));
    sinv_start <= 1; shinv_start <= 1; ninv_start <= 1;
    @(posedge clk);
    sinv_start <= 0; shinv_start <= 0; ninv_start <= 0;
    #1;
    while (!(shinv_done) && n < 100) begin @(posedge clk); #1; n++; end
    inv_sh = int'(shinv_inv);
    shifts = int'(shinv_cycles);
    while (sinv_busy || ninv_busy) @(posedge clk);
    #1;
    inv_s = int'(sinv_inv);
    inv_n = nb_to_std(int'(ninv_inv), NBE, M, PP);
  endtask

  task automatic run_pmul(input int x, input int y, output int d_arr, output int d_ax);
    pmul_a <= M'(x); pmul_b <= M'(y); pmul_en <= 1;
    @(posedge clk);
    pmul_en <= 0;
    @(posedge clk);
    #1;
    d_arr = int'(pmul_d_array);
    d_ax  = int'(pmul_d_andxor);
  endtask

  task automatic run_log(input int op, input int x, input int y, output int d, output bit err);
    log_op <= 2'(op); log_a <= M'(x); log_b <= M'(y);
    @(posedge clk);
    #1;
    d = int'(log_d);
    err = log_err;
  endtask

  task automatic run_adders(input int x, input int y, output int dp, output int ds);
    padd_a <= M'(x); padd_b <= M'(y); padd_en <= 1;
    sadd_a <= M'(x); sadd_b <= M'(y); sadd_ld <= 1;
    @(posedge clk);
    padd_en <= 0; sadd_ld <= 0; sadd_en <= 1;
    #1;
    dp = int'(padd_d);
    repeat (M) @(posedge clk);
    sadd_en <= 0;
    #1;
    ds = int'(sadd_d);
  endtask

  // one word through the streaming serial multiplier: A in slot 0, B in
  // slot 1, product read in slot 2 (clock offsets as documented by the unit)
  task automatic run_smul(input int x, input int y, output int d, output bit first_ok);
    // align to a slot boundary: d_first rises every m clocks, one clock
    // after a slot starts
    do begin @(posedge clk); #1; end while (!smul_d_first);
    // now M-1 clocks remain in the current slot; wait for the next slot
    repeat (M - 2) @(posedge clk);
    for (int i = M - 1; i >= 0; i--) begin
      smul_a_in <= x[i];
      @(posedge clk);
    end
    smul_a_in <= 0;
    for (int i = M - 1; i >= 0; i--) begin
      smul_b_in <= y[i];
      @(posedge clk);
    end
    smul_b_in <= 0;
    repeat (2) @(posedge clk);
    #1;
    first_ok = smul_d_first;
    d = 0;
    for (int i = 0; i < M; i++) begin
      d = (d << 1) | int'(smul_d_out);
      @(posedge clk);
      #1;
    end
  endtask

  task automatic run_fixed(input int y, output int d_ser, output int d_shift,
                           output int d_par, output int d_sq, output int d_rt);
    fsmul_clear <= 1;
    lin_b <= M'(y); lin_en <= 1;
    @(posedge clk);
    fsmul_clear <= 0; lin_en <= 0;
    for (int i = M - 1; i >= 0; i--) begin
      fsmul_b_in <= y[i];
      @(posedge clk);
    end
    fsmul_b_in <= 0;
    #1;
    d_ser = int'(fsmul_d);
    d_par = int'(lin_d_const);
    d_sq  = int'(lin_d_square);
    d_rt  = int'(lin_d_sqrt);
    fsmul_shift_out <= 1;
    d_shift = 0;
    for (int i = 0; i < M; i++) begin
      d_shift = (d_shift << 1) | int'(fsmul_d_out);
      @(posedge clk);
      #1;
    end
    fsmul_shift_out <= 0;
    n_shiftout++;
  endtask

  task automatic run_dual(input int z, input int g, output int w1, output int wp [NC]);
    int zd = to_dual(z, M, PP);
    dual_g <= M'(g); dual_g_ld <= 1;
    for (int i = 0; i < NC; i++) dpoly_g[i] <= M'(rmul(g, rpow(2, i, M, PP), M, PP));
    dpoly_g_ld <= 1;
    for (int k = 0; k < M; k++) begin
      dual_z_ld <= 1; dual_z_in <= zd[k];
      dpoly_z_ld <= 1; dpoly_z_in <= zd[k];
      @(posedge clk);
      dual_g_ld <= 0; dpoly_g_ld <= 0;
    end
    dual_z_ld <= 0; dpoly_z_ld <= 0;
    w1 = 0;
    for (int i = 0; i < NC; i++) wp[i] = 0;
    for (int k = 0; k < M; k++) begin
      dual_en <= 1; dpoly_en <= 1;
      @(posedge clk);
      #1;
      w1[k] = dual_w;
      for (int i = 0; i < NC; i++) wp[i][k] = dpoly_w[i];
    end
    dual_en <= 0; dpoly_en <= 0;
  endtask

  task automatic run_nb(input int xn, input int yn, output int ds, output int dp);
    for (int i = M - 1; i >= 0; i--) begin
      snb_ld <= 1; snb_a_in <= xn[i]; snb_b_in <= yn[i];
      @(posedge clk);
    end
    snb_ld <= 0;
    pnb_a <= M'(xn); pnb_b <= M'(yn); pnb_en <= 1;
    ds = 0;
    for (int k = M - 1; k >= 0; k--) begin
      #1;
      ds[k] = snb_d_out;
      @(posedge clk);
      pnb_en <= 0;
    end
    #1;
    dp = int'(pnb_d);
  endtask

  initial begin
    int a, b, q, ib, i1, i2, i3, sh, d1, d2, dl, ds, dsp, ssum, psum, w1, s1, s2, s3, s4, s5;
    int wp [NC];
    bit err, fok;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < ROUNDS; r++) begin
      // make sure the special operands occur: 1 (alpha^0), alpha^1 and 0
      if (r == 0)      begin a = 5; b = 1; end
      else if (r == 1) begin a = 7; b = 2; end
      else if (r == 2) begin a = 0; b = 9; end
      else if (r == 3) begin a = 6; b = 0; end
      else begin a = $urandom_range(15); b = $urandom_range(15); end
      ib = rinv(b, M, PP);
      q  = rmul(a, ib, M, PP);

      run_inv(b, i1, i2, i3, sh);
      check(i1 == ib, $sformatf("inv_std(%h)=%h", b, i1));
      check(i2 == ib, $sformatf("inv_shift(%h)=%h", b, i2));
      check(i3 == ib, $sformatf("inv_nb(%h)=%h", b, i3));
      if (b != 0 && sh == (1 << M) - 2) n_maxshift++;
      if (b == 1) begin
        check(sh == 0, "inv_shift of 1 needs no shift");
        n_one++;
      end

      run_pmul(a, i1, d1, d2);
      check(d1 == q && d2 == q, $sformatf("par mul %h*%h = %h/%h", a, i1, d1, d2));

      // the shift-register inverter as a divider: A starts at a
      shinv_num <= M'(a);
      run_inv(b, i1, i2, i3, sh);
      shinv_num <= 1;
      check(i2 == q, $sformatf("shift divide %h/%h = %h", a, b, i2));
      if (b != 0 && a != 0 && a != 1) n_divide++;

      run_log(2, a, b, dl, err);
      check(dl == q, $sformatf("log div %h/%h = %h", a, b, dl));
      check(err == (b == 0), "log err flag");
      if (a == 0 || b == 0) n_zero++;
      run_log(0, a, b, dl, err);
      check(dl == rmul(a, b, M, PP), $sformatf("log mul %h*%h = %h", a, b, dl));
      if (a != 0 && b != 0) begin
        int la = 0, lb = 0;
        for (int k = 0; k < 15; k++) begin
          if (rpow(2, k, M, PP) == a) la = k;
          if (rpow(2, k, M, PP) == b) lb = k;
        end
        if (la + lb >= 15) n_wrap++;
        // the same product by counting through the antilog table
        lcnt_i_exp <= M'(la); lcnt_j_exp <= M'(lb); lcnt_start <= 1;
        @(posedge clk);
        lcnt_start <= 0;
        #1;
        while (!lcnt_done) begin @(posedge clk); #1; end
        check(int'(lcnt_d) == rmul(a, b, M, PP), $sformatf("counting mul %h*%h = %h", a, b, lcnt_d));
        if (la + lb >= 15) n_cntwrap++;
      end

      run_smul(a, i1, ds, fok);
      check(fok, "serial multiplier d_first");
      check(ds == q, $sformatf("serial mul %h*%h = %h", a, i1, ds));
      if (clmul(a, i1) != q) n_reduce++;

      run_adders(d1, ds, psum, ssum);
      check(psum == 0 && ssum == 0, "adders: q + q = 0");
      run_adders(a, b, psum, ssum);
      check(psum == (a ^ b) && ssum == (a ^ b), "adders: a + b");

      run_dual(a, ib, w1, wp);
      check(w1 == to_dual(q, M, PP), $sformatf("dual %h*%h", a, ib));
      for (int i = 0; i < NC; i++)
        check(wp[i] == to_dual(rmul(q, rpow(2, i, M, PP), M, PP), M, PP), "dual poly");

      run_nb(std_to_nb(a, NBE, M, PP), std_to_nb(b, NBE, M, PP), s1, s2);
      check(s1 == std_to_nb(rmul(a, b, M, PP), NBE, M, PP), "serial Massey-Omura");
      check(s2 == std_to_nb(rmul(a, b, M, PP), NBE, M, PP), "parallel Massey-Omura");

      run_fixed(a, s1, s2, s3, s4, s5);
      check(s1 == rmul('hC, a, M, PP) && s2 == s1 && s3 == s1, "fixed multipliers");
      check(s4 == rmul(a, a, M, PP) && rmul(s5, s5, M, PP) == a, "square / sqrt");
    end
    check(n_reduce > 0, "modulo feedback never used");
    check(n_wrap > 0, "exponent wrap never happened");
    check(n_zero > 0, "zero operand never seen");
    check(n_maxshift > 0, "no full-length shift inversion");
    check(n_one > 0, "no inversion of 1");
    check(n_shiftout > 0, "shift-out mode never used");
    check(n_divide > 0, "shift-register division never used");
    check(n_cntwrap > 0, "address counter never wrapped");
    $display("mechanisms: reduce=%0d wrap=%0d zero=%0d maxshift=%0d one=%0d shiftout=%0d divide=%0d cntwrap=%0d",
             n_reduce, n_wrap, n_zero, n_maxshift, n_one, n_shiftout, n_divide, n_cntwrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
