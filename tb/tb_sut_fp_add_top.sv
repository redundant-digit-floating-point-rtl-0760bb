// tb_sut_fp_add_top: end-to-end test of the SUT floating-point add unit at
// its default size (single format, seven digits).
// It runs chains of additions and subtractions: a chain starts from two
// IEEE operands, then feeds each redundant result back as operand 1 (added
// to or subtracted by a new IEEE operand) or as operand 2 (added to a new
// IEEE operand, or subtracted, which may hit an operand digit that cannot be
// negated). Every result is compared with the exact value of its operands:
// it must be within half a unit of its last digit (round to nearest).
// Mechanisms are counted and each must occur: both paths, D = 0 and D = 1 in the normalization path,
// right and left post-shifts in the alignment path, a right shift and a
// multi-digit normalization shift in the normalization path, subtraction,
// chained operands on both sides, inexact (rounded) results, exact
// cancellation to zero, and the flag for an operand that cannot be negated.
module tb_sut_fp_add_top;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  logic [31:0] a_ieee, b_ieee;
  sut_num_t    a_sut, b_sut, result;
  logic        sel_sut_a, sel_sut_b, sub;
  logic        zero, ovf, unf, neg_invalid, path_norm;
  logic [1:0]  post_shift;
  int checks = 0, failures = 0;

  sut_fp_add_top dut (
    .a_ieee(a_ieee), .b_ieee(b_ieee), .a_sut(a_sut), .b_sut(b_sut),
    .sel_sut_a(sel_sut_a), .sel_sut_b(sel_sut_b), .sub(sub),
    .result(result), .zero(zero), .ovf(ovf), .unf(unf),
    .neg_invalid(neg_invalid), .path_norm(path_norm), .post_shift(post_shift));

  typedef enum int {
    M_NORM, M_ALIGN, M_D0, M_D1, M_A_RIGHT, M_A_LEFT, M_N_RIGHT, M_N_MULTI,
    M_SUB, M_CHAIN_A, M_CHAIN_B, M_INEXACT, M_ZERO, M_NEG_INVALID, M_COUNT
  } mech_e;
  int seen[M_COUNT];
  string names[M_COUNT] = '{"normalization path", "alignment path", "D=0", "D=1",
    "alignment right shift", "alignment left shift", "normalization right shift",
    "multi-digit normalization shift", "subtraction", "chained operand 1",
    "chained operand 2", "inexact result", "zero result", "operand 2 not negatable"};

  task automatic check(bit ok, string what, real want);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: sel=%0d%0d sub=%0d got=%e want=%e ulp=%e", what, sel_sut_a,
                 sel_sut_b, sub, num_value(result), want, ulp_of(result.exp));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] near_ieee(sut_num_t n, int lo, int hi);
    logic [31:0] f;
    int e;
    e = 127 + 4 * eval_exp(n.exp) + lo + int'($urandom % (hi - lo + 1));
    if (e < 1) e = 1;
    if (e > 254) e = 254;
    f = rand_ieee(1, 1);
    f[30:23] = 8'(e);
    return f;
  endfunction

  initial begin
    sut_num_t acc;
    real      va, vb, want;
    int       d, lz;
    acc = '0;
    for (int i = 0; i < 30000; i++) begin
      int step;
      step = i % 12;
      if (step == 0) begin
        sel_sut_a = 0; sel_sut_b = 0;
        a_ieee = rand_ieee(80, 170);
        b_ieee = a_ieee;
        b_ieee[30:23] = 8'(int'(a_ieee[30:23]) + int'($urandom % 21) - 10);
        b_ieee[22:0]  = (i % 5 == 0) ? a_ieee[22:0] : 23'($urandom);
        b_ieee[31]    = 1'($urandom);
        sub = 1'($urandom);
        a_sut = '0; b_sut = '0;
      end else if ($urandom % 3 != 0) begin
        sel_sut_a = 1; sel_sut_b = 0;
        a_sut = acc; b_sut = '0;
        a_ieee = '0;
        b_ieee = near_ieee(acc, -30, 6);
        sub = 1'($urandom);
      end else begin
        sel_sut_a = 0; sel_sut_b = 1;
        b_sut = acc; a_sut = '0;
        b_ieee = '0;
        a_ieee = near_ieee(acc, -30, 6);
        sub = ($urandom % 4 == 0);
      end
      #1;
      va = sel_sut_a ? num_value(a_sut) : ieee_value(a_ieee);
      vb = sel_sut_b ? num_value(b_sut) : ieee_value(b_ieee);
      want = sub ? va - vb : va + vb;
      if (neg_invalid) begin
        seen[M_NEG_INVALID]++;
        check(sel_sut_b && sub, "negation flag only for a chained operand 2", want);
        acc = sel_sut_b ? b_sut : a_sut;
        continue;
      end
      if (zero) begin
        check(want == 0.0, "zero result", want);
        seen[M_ZERO]++;
        acc = '0;
        i = i - step + 11;  // start a new chain
        continue;
      end
      check(want != 0.0, "nonzero result", want);
      check(absr(num_value(result) - want) <= ulp_of(result.exp), "value within 1 ulp", want);
      // round to nearest; the slack covers the rounding of the real reference
      check(2.0 * absr(num_value(result) - want) <= ulp_of(result.exp) * (1.0 + pow2(-20)),
            "value within half an ulp", want);
      check(!ovf && !unf, "exponent in range", want);
      if (num_value(result) != want) seen[M_INEXACT]++;
      // mechanisms
      d = eval_exp(sel_sut_a ? a_sut.exp : dut.f1_exp) - eval_exp(sel_sut_b ? b_sut.exp : dut.f2_exp);
      if (d < 0) d = -d;
      if (path_norm) begin
        seen[M_NORM]++;
        if (d == 0) seen[M_D0]++; else seen[M_D1]++;
        check(d <= 1, "path select", want);
        if (post_shift == 2'd1) seen[M_N_RIGHT]++;
        lz = eval_exp(dut.u_add.e_l) - eval_exp(result.exp);
        if (post_shift == 2'd2 && lz >= 2) seen[M_N_MULTI]++;
      end else begin
        seen[M_ALIGN]++;
        check(d >= 2, "path select", want);
        if (post_shift == 2'd1) seen[M_A_RIGHT]++;
        if (post_shift == 2'd2) seen[M_A_LEFT]++;
      end
      if (sub) seen[M_SUB]++;
      if (sel_sut_a) seen[M_CHAIN_A]++;
      if (sel_sut_b) seen[M_CHAIN_B]++;
      acc = result;
    end
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-34s %0d", names[m], seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", names[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
