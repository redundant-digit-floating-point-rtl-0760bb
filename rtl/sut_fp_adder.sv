// sut_fp_adder: dual-path floating-point adder/subtractor for numbers in the
// redundant radix-16 SUT format. Computes f3 = f1 + f2, or f1 - f2 when sub
// is set, and leaves f3 in the same redundant format, rounded to nearest by a
// stored rounding value instead of an increment.
//
// Structure (as in the document's block diagram):
//  * Exponent difference of the two radix-16 exponents gives the sign
//    (f1_ge), the magnitude and the flags |D| = 0 and |D| <= 1.
//  * Negation of operand 2 for subtraction; since the sign is embedded in
//    the digits, the adders only ever add and no result is post-complemented.
//  * Two operand muxes pick the operand with the larger exponent (L) and the
//    one with the smaller exponent (S).
//  * Alignment path (used when |D| >= 2): S is shifted right |D| digits,
//    keeping guard, round and sticky; L + S is formed; one digit left or
//    right shift follows: right when the adder's most-significant transfer
//    is nonzero, left when the most-significant sum digit is zero.
//  * Normalization path (used when |D| <= 1): S is shifted right one digit
//    when |D| = 1 (its last digit becomes the guard digit); L + S is formed;
//    a nonzero top transfer shifts right one digit, otherwise leading zero
//    digits are counted and removed by a left shift that brings the guard
//    digit back first.
//  * A mux selects the path by |D| <= 1; the exponent of L is adjusted by the
//    shift (+1, 0, -1 or -count); the rounding logic rewrites the
//    least-significant digit from its unibit, its low posibit, the round
//    digit class and the sticky digit.
// Round and sticky per case, following the document: alignment path with no
// shift: round = guard, sticky takes the old round digit; right shift:
// round = the digit shifted out of the sum, sticky takes round and guard;
// left shift: guard moves into the LSD, round and sticky are unchanged.
// Normalization path: round = guard when |D| = 1 and there is no shift;
// after a right shift round = shifted-out digit and sticky takes the guard;
// after a left shift round and sticky are zero.
// Status outputs (this design's additions): zero (all digits zero),
// ovf/unf (result exponent outside [-2^(EW-2), 2^(EW-2)], that is
// [-32, 32] for the single format, exponent then clamped), and
// neg_invalid (a digit of operand 2 could not be negated, see sut_negate).
// Both paths are always computed; the unit is combinational.
module sut_fp_adder
  import sut_pkg::*;
#(
  parameter int N  = NDIG,             // significand digits (7 single, 15 double)
  parameter int EW = 7                 // exponent twits (7 single, 10 double)
) (
  input  logic [EW-1:0]       eps,     // exponent of f1
  input  sut_digit_t [N-1:0]  mu1,     // significand of f1
  input  logic [EW-1:0]       eta,     // exponent of f2
  input  sut_digit_t [N-1:0]  mu2,     // significand of f2
  input  logic                sub,
  output logic [EW-1:0]       e3,
  output sut_digit_t [N-1:0]  mu3,
  output logic                zero,
  output logic                ovf,
  output logic                unf,
  output logic                neg_invalid,
  // observation of the internal mechanisms (path, shift kind)
  output logic                path_norm,
  output logic [1:0]          post_shift   // 0 none, 1 right, 2 left
);

  localparam int CW   = $clog2(N + 1);
  localparam int EVW  = EW + 2;        // width of the signed exponent value
  localparam int EMAX = 2 ** (EW - 2); // exponent range is [-EMAX, EMAX]

  // Exponent {top bit, negabits, extra negabit e''2} to its value and back
  // (the top bit has weight EMAX, the negabits weights EMAX/2 .. 1 minus one
  // each, the extra negabit weight 1 minus one).
  function automatic logic signed [EVW-1:0] exp_val(logic [EW-1:0] e);
    return EVW'(signed'({3'b000, e[EW-1:1]})) + EVW'(signed'({{(EVW-1){1'b0}}, e[0]}))
           - EVW'(EMAX);
  endfunction

  function automatic logic [EW-1:0] exp_enc(logic signed [EVW-1:0] v);
    if (v <= -EVW'(EMAX))    return '0;
    else if (v >= EVW'(EMAX)) return '1;
    else                      return {(EW-1)'(v + EVW'(EMAX) - EVW'(1)), 1'b1};
  endfunction

  // ---------------- exponent difference and operand selection -------------
  logic       f1_ge, eq0, le1, mag_x;
  logic [EW-2:0] mag_v;
  logic [EW-1:0] mag;

  sut_exp_diff #(.EW(EW)) u_ediff (
    .eps(eps), .eta(eta), .f1_ge(f1_ge), .mag_v(mag_v), .mag_x(mag_x),
    .mag(mag), .eq0(eq0), .le1(le1)
  );

  sut_digit_t [N-1:0] mu2n;
  sut_negate #(.N(N)) u_neg (.en(sub), .d_in(mu2), .d_out(mu2n), .invalid(neg_invalid));

  sut_digit_t [N-1:0] op_l, op_s;
  logic [EW-1:0]      e_l;
  assign op_l   = f1_ge ? mu1  : mu2n;
  assign op_s = f1_ge ? mu2n : mu1;
  assign e_l = f1_ge ? eps  : eta;

  // ---------------- alignment path ----------------------------------------
  sut_digit_t [N-1:0] a_sh, a_sum, a_res;
  sut_digit_t         a_guard, a_rnd, a_tdig;
  sticky_t            a_sticky, a_st_r, a_st_rg, a_st_out;
  logic [1:0]         a_tout;
  logic               a_tnz;
  sut_digit_t         a_round_dig;
  logic [1:0]         a_shift;

  sut_align_shifter #(.N(N), .MW(EW-1)) u_ash (
    .d_in(op_s), .mag_v(mag_v), .mag_x(mag_x),
    .d_out(a_sh), .guard(a_guard), .rnd(a_rnd), .sticky(a_sticky)
  );

  sut_sig_adder #(.N(N)) u_aadd (.a(op_l), .b(a_sh), .s(a_sum), .tout(a_tout), .tout_nz(a_tnz));

  // digit holding the top transfer value
  assign a_tdig = '{n3: 1'b1, p2: 1'b0, p1: 1'b0, p0: a_tout[1] ^ a_tout[0], u: a_tout[1] & a_tout[0]};

  // sticky after folding in the round digit, then the guard digit
  sut_sticky_cell u_ast_r (.s_in(a_sticky), .z_in(a_rnd),   .s_out(a_st_r));
  sut_sticky_cell u_ast_g (.s_in(a_st_r),   .z_in(a_guard), .s_out(a_st_rg));

  always_comb begin
    if (a_tnz) begin                               // one-digit right shift
      a_shift     = 2'd1;
      a_res       = {a_tdig, a_sum[N-1:1]};
      a_round_dig = a_sum[0];
      a_st_out    = a_st_rg;
    end else if (digit_is_zero(a_sum[N-1])) begin  // one-digit left shift
      a_shift     = 2'd2;
      a_res       = {a_sum[N-2:0], a_guard};
      a_round_dig = a_rnd;
      a_st_out    = a_sticky;
    end else begin                                 // no shift
      a_shift     = 2'd0;
      a_res       = a_sum;
      a_round_dig = a_guard;
      a_st_out    = a_st_r;
    end
  end

  // ---------------- normalization path ------------------------------------
  sut_digit_t [N-1:0] n_sh, n_sum, n_lres, n_res;
  sut_digit_t         n_guard, n_tdig, n_round_dig;
  logic [1:0]         n_tout;
  logic               n_tnz, n_allz;
  logic [CW-1:0]      n_lz;
  sticky_t            n_st_g, n_st_out;
  logic [1:0]         n_shift;

  // one-digit right shifter, bypassed when D = 0
  assign n_sh    = eq0 ? op_s : {DIGIT_ZERO, op_s[N-1:1]};
  assign n_guard = eq0 ? DIGIT_ZERO : op_s[0];

  sut_sig_adder #(.N(N)) u_nadd (.a(op_l), .b(n_sh), .s(n_sum), .tout(n_tout), .tout_nz(n_tnz));

  assign n_tdig = '{n3: 1'b1, p2: 1'b0, p1: 1'b0, p0: n_tout[1] ^ n_tout[0], u: n_tout[1] & n_tout[0]};

  sut_lzd_norm #(.N(N)) u_lzd (.s(n_sum), .guard(n_guard), .d_out(n_lres), .lz(n_lz), .all_zero(n_allz));

  sut_sticky_cell u_nst_g (.s_in(STICKY_ZERO), .z_in(n_guard), .s_out(n_st_g));

  always_comb begin
    if (n_tnz) begin
      n_shift     = 2'd1;
      n_res       = {n_tdig, n_sum[N-1:1]};
      n_round_dig = n_sum[0];
      n_st_out    = n_st_g;
    end else if (n_lz != '0) begin
      n_shift     = 2'd2;
      n_res       = n_lres;
      n_round_dig = DIGIT_ZERO;
      n_st_out    = STICKY_ZERO;
    end else begin
      n_shift     = 2'd0;
      n_res       = n_sum;
      n_round_dig = n_guard;
      n_st_out    = STICKY_ZERO;
    end
  end

  // ---------------- path selection, exponent adjust, rounding -------------
  sut_digit_t [N-1:0] res;
  sut_digit_t         rdig;
  sticky_t            rst;
  logic signed [EVW-1:0] e_adj, e_val;
  logic               r2, la;

  assign path_norm  = le1;
  assign post_shift = le1 ? n_shift : a_shift;
  assign res        = le1 ? n_res : a_res;
  assign rdig       = le1 ? n_round_dig : a_round_dig;
  assign rst        = le1 ? n_st_out : a_st_out;

  always_comb begin
    unique case (post_shift)
      2'd1:    e_adj = EVW'(1);
      2'd2:    e_adj = le1 ? -EVW'(signed'({1'b0, n_lz})) : -EVW'(1);
      default: e_adj = '0;
    endcase
  end

  assign e_val = exp_val(e_l) + e_adj;
  assign ovf   = (e_val > EVW'(EMAX));
  assign unf   = (e_val < -EVW'(EMAX));
  assign e3    = exp_enc(e_val);

  sut_round u_round (
    .u2(res[0].u), .lb(res[0].p0), .rc(digit_rclass(rdig)), .st(rst),
    .r2(r2), .la(la)
  );

  always_comb begin
    mu3       = res;
    mu3[0].p0 = la;
    mu3[0].u  = r2;
  end

  assign zero = le1 ? n_allz : 1'b0;

endmodule
