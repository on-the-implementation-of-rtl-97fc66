// gf_ops_top: a library of GF(2^m) arithmetic units placed side by side.
//
// The units cover the three element representations and both serial and
// parallel styles:
//   addition        : bit-serial (gf_ser_add) and bit-parallel (gf_par_add)
//   standard basis  : general bit-serial (gf_ser_std_mul), fixed-coefficient
//                     bit-serial (gf_fixed_ser_mul), cell-array bit-parallel
//                     (gf_par_std_mul), AND/XOR-array bit-parallel
//                     (gf_par_andxor_mul), fixed-coefficient bit-parallel
//                     (gf_fixed_par_mul), squarer (gf_square), square root
//                     (gf_sqrt)
//   normal basis    : bit-serial and bit-parallel Massey-Omura multipliers
//                     (gf_ser_nb_mul, gf_par_nb_mul)
//   dual basis      : bit-serial multiplier (gf_dual_mul) and polynomial
//                     multiplier (gf_dual_poly_mul)
//   inversion       : multiply-and-square loop in standard and in normal
//                     basis (gf_inv_std, gf_inv_nb), shift-register inverter
//                     (gf_inv_shift, which also divides), log/antilog
//                     table unit (gf_log_alu), multiplication by counting
//                     through the antilog table (gf_log_cnt_mul)
// The units do not share state; each keeps its own ports, prefixed with its
// name. The combinational parallel multipliers, squarer and square root get
// operand and result registers here (one clock per result, loaded when
// <unit>_en is high), as the document's drawings show them between A, B and
// D registers. All units share one clock and one asynchronous active-low
// reset and use the same field: GF(2^M) with polynomial P (default GF(2^4),
// p = x^4 + x + 1) and, for the normal basis, beta = alpha^NB_EXP.
module gf_ops_top #(
  parameter int M = gf_pkg::DEF_M,
  parameter logic [M:0] P = gf_pkg::DEF_P,
  parameter logic [M-1:0] A_CONST = 4'b1100,
  parameter int unsigned NB_EXP = 7,
  parameter int NCOEF = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // bit-serial adder
  input  logic                    sadd_ld,
  input  logic                    sadd_en,
  input  logic [M-1:0]            sadd_a,
  input  logic [M-1:0]            sadd_b,
  output logic [M-1:0]            sadd_d,
  // bit-parallel adder
  input  logic                    padd_en,
  input  logic [M-1:0]            padd_a,
  input  logic [M-1:0]            padd_b,
  output logic [M-1:0]            padd_d,
  // general bit-serial standard-basis multiplier
  input  logic                    smul_a_in,
  input  logic                    smul_b_in,
  input  logic [M-1:0]            smul_p,
  output logic                    smul_d_out,
  output logic                    smul_d_first,
  output logic [M-1:0]            smul_d_word,
  // fixed-coefficient bit-serial multiplier
  input  logic                    fsmul_clear,
  input  logic                    fsmul_shift_out,
  input  logic                    fsmul_b_in,
  output logic [M-1:0]            fsmul_d,
  output logic                    fsmul_d_out,
  // bit-parallel multipliers (registered operands and result)
  input  logic                    pmul_en,
  input  logic [M-1:0]            pmul_a,
  input  logic [M-1:0]            pmul_b,
  output logic [M-1:0]            pmul_d_array,
  output logic [M-1:0]            pmul_d_andxor,
  // fixed-coefficient bit-parallel multiplier, squarer, square root
  input  logic                    lin_en,
  input  logic [M-1:0]            lin_b,
  output logic [M-1:0]            lin_d_const,
  output logic [M-1:0]            lin_d_square,
  output logic [M-1:0]            lin_d_sqrt,
  // bit-serial Massey-Omura multiplier
  input  logic                    snb_ld,
  input  logic                    snb_a_in,
  input  logic                    snb_b_in,
  output logic                    snb_d_out,
  // bit-parallel Massey-Omura multiplier (registered operands and result)
  input  logic                    pnb_en,
  input  logic [M-1:0]            pnb_a,
  input  logic [M-1:0]            pnb_b,
  output logic [M-1:0]            pnb_d,
  // dual-basis multiplier
  input  logic                    dual_z_ld,
  input  logic                    dual_z_in,
  input  logic                    dual_g_ld,
  input  logic [M-1:0]            dual_g,
  input  logic                    dual_en,
  output logic                    dual_w,
  // dual-basis polynomial multiplier
  input  logic                    dpoly_z_ld,
  input  logic                    dpoly_z_in,
  input  logic                    dpoly_g_ld,
  input  logic [NCOEF-1:0][M-1:0] dpoly_g,
  input  logic                    dpoly_en,
  output logic [NCOEF-1:0]        dpoly_w,
  // standard-basis sequential inverter
  input  logic                    sinv_start,
  input  logic [M-1:0]            sinv_beta,
  output logic                    sinv_busy,
  output logic                    sinv_done,
  output logic [M-1:0]            sinv_inv,
  // normal-basis sequential inverter
  input  logic                    ninv_start,
  input  logic [M-1:0]            ninv_beta,
  output logic                    ninv_busy,
  output logic                    ninv_done,
  output logic [M-1:0]            ninv_inv,
  // shift-register inverter
  input  logic                    shinv_start,
  input  logic [M-1:0]            shinv_beta,
  input  logic [M-1:0]            shinv_num,
  output logic                    shinv_busy,
  output logic                    shinv_done,
  output logic [M-1:0]            shinv_inv,
  output logic [M:0]              shinv_cycles,
  // log/antilog table unit
  input  logic [1:0]              log_op,
  input  logic [M-1:0]            log_a,
  input  logic [M-1:0]            log_b,
  output logic [M-1:0]            log_d,
  output logic                    log_err,
  // multiplication by counting through the antilog table
  input  logic                    lcnt_start,
  input  logic [M-1:0]            lcnt_i_exp,
  input  logic [M-1:0]            lcnt_j_exp,
  output logic                    lcnt_busy,
  output logic                    lcnt_done,
  output logic [M-1:0]            lcnt_d,
  output logic [M-1:0]            lcnt_exp
);

  // ---------------- addition ----------------
  gf_ser_add #(.M(M)) u_ser_add (
    .clk, .rst_n, .ld(sadd_ld), .a(sadd_a), .b(sadd_b), .en(sadd_en), .d(sadd_d));

  gf_par_add #(.M(M)) u_par_add (
    .clk, .rst_n, .en(padd_en), .a(padd_a), .b(padd_b), .d(padd_d));

  // ---------------- standard basis, serial ----------------
  gf_ser_std_mul #(.M(M)) u_ser_std_mul (
    .clk, .rst_n, .a_in(smul_a_in), .b_in(smul_b_in), .p_in(smul_p),
    .d_out(smul_d_out), .d_first(smul_d_first), .d_word(smul_d_word));

  gf_fixed_ser_mul #(.M(M), .P(P), .A_CONST(A_CONST)) u_fixed_ser_mul (
    .clk, .rst_n, .clear(fsmul_clear), .shift_out(fsmul_shift_out), .b_in(fsmul_b_in),
    .d(fsmul_d), .d_out(fsmul_d_out));

  // ---------------- standard basis, parallel ----------------
  logic [M-1:0] pmul_a_r, pmul_b_r, pmul_arr, pmul_ax;

  gf_par_std_mul    #(.M(M), .P(P)) u_par_std_mul    (.a(pmul_a_r), .b(pmul_b_r), .d(pmul_arr));
  gf_par_andxor_mul #(.M(M), .P(P)) u_par_andxor_mul (.a(pmul_a_r), .b(pmul_b_r), .d(pmul_ax));

  logic [M-1:0] lin_b_r, lin_c, lin_s, lin_q;

  gf_fixed_par_mul #(.M(M), .P(P), .A_CONST(A_CONST)) u_fixed_par_mul (.b(lin_b_r), .d(lin_c));
  gf_square        #(.M(M), .P(P)) u_square (.b(lin_b_r), .d(lin_s));
  gf_sqrt          #(.M(M), .P(P)) u_sqrt   (.b(lin_b_r), .d(lin_q));

  // ---------------- normal basis ----------------
  gf_ser_nb_mul #(.M(M), .P(P), .NB_EXP(NB_EXP)) u_ser_nb_mul (
    .clk, .rst_n, .ld(snb_ld), .a_in(snb_a_in), .b_in(snb_b_in), .d_out(snb_d_out));

  logic [M-1:0] pnb_a_r, pnb_b_r, pnb_prod;

  gf_par_nb_mul #(.M(M), .P(P), .NB_EXP(NB_EXP)) u_par_nb_mul (
    .a(pnb_a_r), .b(pnb_b_r), .d(pnb_prod));

  // operand/result registers of the combinational units: a result appears
  // one clock after its operands were loaded
  logic pmul_v, lin_v, pnb_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pmul_a_r <= '0; pmul_b_r <= '0; pmul_d_array <= '0; pmul_d_andxor <= '0;
      lin_b_r  <= '0; lin_d_const <= '0; lin_d_square <= '0; lin_d_sqrt <= '0;
      pnb_a_r  <= '0; pnb_b_r <= '0; pnb_d <= '0;
      pmul_v   <= 1'b0; lin_v <= 1'b0; pnb_v <= 1'b0;
    end else begin
      pmul_v <= pmul_en;
      lin_v  <= lin_en;
      pnb_v  <= pnb_en;
      if (pmul_en) begin pmul_a_r <= pmul_a; pmul_b_r <= pmul_b; end
      if (pmul_v)  begin pmul_d_array <= pmul_arr; pmul_d_andxor <= pmul_ax; end
      if (lin_en)  lin_b_r <= lin_b;
      if (lin_v)   begin lin_d_const <= lin_c; lin_d_square <= lin_s; lin_d_sqrt <= lin_q; end
      if (pnb_en)  begin pnb_a_r <= pnb_a; pnb_b_r <= pnb_b; end
      if (pnb_v)   pnb_d <= pnb_prod;
    end
  end

  // ---------------- dual basis ----------------
  gf_dual_mul #(.M(M), .P(P)) u_dual_mul (
    .clk, .rst_n, .z_ld(dual_z_ld), .z_in(dual_z_in), .g_ld(dual_g_ld), .g(dual_g),
    .en(dual_en), .w(dual_w));

  gf_dual_poly_mul #(.M(M), .P(P), .NCOEF(NCOEF)) u_dual_poly_mul (
    .clk, .rst_n, .z_ld(dpoly_z_ld), .z_in(dpoly_z_in), .g_ld(dpoly_g_ld), .g(dpoly_g),
    .en(dpoly_en), .w(dpoly_w));

  // ---------------- inversion ----------------
  gf_inv_std #(.M(M), .P(P)) u_inv_std (
    .clk, .rst_n, .start(sinv_start), .beta(sinv_beta), .busy(sinv_busy),
    .done(sinv_done), .inv(sinv_inv));

  gf_inv_nb #(.M(M), .P(P), .NB_EXP(NB_EXP)) u_inv_nb (
    .clk, .rst_n, .start(ninv_start), .beta(ninv_beta), .busy(ninv_busy),
    .done(ninv_done), .inv(ninv_inv));

  gf_inv_shift #(.M(M), .P(P)) u_inv_shift (
    .clk, .rst_n, .start(shinv_start), .beta(shinv_beta), .num(shinv_num), .busy(shinv_busy),
    .done(shinv_done), .inv(shinv_inv), .cycles(shinv_cycles));

  gf_log_alu #(.M(M), .P(P)) u_log_alu (
    .clk, .rst_n, .op(log_op), .a(log_a), .b(log_b), .d(log_d), .err(log_err));

  gf_log_cnt_mul #(.M(M), .P(P)) u_log_cnt_mul (
    .clk, .rst_n, .start(lcnt_start), .i_exp(lcnt_i_exp), .j_exp(lcnt_j_exp),
    .busy(lcnt_busy), .done(lcnt_done), .d(lcnt_d), .exp_out(lcnt_exp));

endmodule
