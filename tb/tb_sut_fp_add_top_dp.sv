// tb_sut_fp_add_top_dp: end-to-end test of the SUT floating-point add unit
// built for the IEEE double format (IW = 64: fifteen digits, 10 exponent
// twits). Double operands are too long for a real-valued reference, so every
// operand and result is turned into an exact fixed-point integer (LSB weight
// 2^-OFF, W bits) and the result must be within half a unit of its last
// digit of the exact sum or difference (round to nearest). Chains feed each redundant result back as
// operand 1 or operand 2, as in the single-format test; operand exponents
// reach beyond the single range. Mechanisms are counted and each must occur.
module tb_sut_fp_add_top_dp;
  import sut_pkg::*;

  localparam int IW  = 64;
  localparam int N   = 15;
  localparam int EW  = 10;
  localparam int SW  = EW + 5 * N;
  localparam int W   = 1536;
  localparam int OFF = 640;

  typedef logic signed [W-1:0] fix_t;

  logic [IW-1:0] a_ieee, b_ieee;
  logic [SW-1:0] a_sut, b_sut, result;
  logic          sel_sut_a, sel_sut_b, sub;
  logic          zero, ovf, unf, neg_invalid, path_norm;
  logic [1:0]    post_shift;
  int checks = 0, failures = 0;

  sut_fp_add_top #(.IW(IW)) dut (
    .a_ieee(a_ieee), .b_ieee(b_ieee), .a_sut(a_sut), .b_sut(b_sut),
    .sel_sut_a(sel_sut_a), .sel_sut_b(sel_sut_b), .sub(sub),
    .result(result), .zero(zero), .ovf(ovf), .unf(unf),
    .neg_invalid(neg_invalid), .path_norm(path_norm), .post_shift(post_shift));

  // ---- reference decoding, from the format definitions ------------------
  //   digit    = 8*(n3-1) + 4*p2 + 2*p1 + p0 + (2*u-1)
  //   exponent = 256*e_top + sum_k (n[k]-1)*2^k + (n2b-1), k = 0..7
  //   number   = sum_i digit_i * 16^(i-14) * 16^exponent
  function automatic int dig(logic [SW-1:0] n, int i);
    logic [4:0] d;
    d = n[5*i +: 5];
    return 8 * (int'(d[4]) - 1) + 4 * int'(d[3]) + 2 * int'(d[2]) + int'(d[1])
           + 2 * int'(d[0]) - 1;
  endfunction

  function automatic int ex(logic [EW-1:0] e);
    int v;
    v = 256 * int'(e[EW-1]) + int'(e[0]) - 1;
    for (int k = 0; k < EW - 2; k++) v += (int'(e[k+1]) - 1) * (1 << k);
    return v;
  endfunction

  function automatic int sut_exp(logic [SW-1:0] n);
    return ex(n[SW-1 -: EW]);
  endfunction

  // unit in the last digit, as a power of two
  function automatic int ulp_pow(logic [SW-1:0] n);
    return 4 * (sut_exp(n) - (N - 1));
  endfunction

  function automatic fix_t sut_fix(logic [SW-1:0] n);
    longint s;
    fix_t   f;
    s = 0;
    for (int i = N - 1; i >= 0; i--) s = s * 16 + longint'(dig(n, i));
    f = W'(s);
    return f <<< (ulp_pow(n) + OFF);
  endfunction

  function automatic fix_t ieee_fix(logic [IW-1:0] x);
    fix_t f;
    f = W'({1'b1, x[51:0]});
    f = f <<< (int'(x[62:52]) - 1023 - 52 + OFF);
    return x[63] ? -f : f;
  endfunction

  function automatic fix_t absf(fix_t f);
    return (f < 0) ? -f : f;
  endfunction

  function automatic logic [IW-1:0] rand_dbl(int lo, int hi);
    logic [IW-1:0] x;
    x[63]    = 1'($urandom);
    x[62:52] = 11'(1023 + lo + int'($urandom % (hi - lo + 1)));
    x[51:0]  = {$urandom, $urandom};
    return x;
  endfunction

  function automatic logic [IW-1:0] near_dbl(logic [SW-1:0] n, int lo, int hi);
    logic [IW-1:0] x;
    x = rand_dbl(0, 0);
    x[62:52] = 11'(1023 + 4 * sut_exp(n) + lo + int'($urandom % (hi - lo + 1)));
    return x;
  endfunction

  typedef enum int {
    M_NORM, M_ALIGN, M_D0, M_D1, M_A_RIGHT, M_A_LEFT, M_N_RIGHT, M_N_MULTI,
    M_SUB, M_CHAIN_A, M_CHAIN_B, M_INEXACT, M_ZERO, M_NEG_INVALID, M_WIDE_EXP, M_COUNT
  } mech_e;
  int seen[M_COUNT];
  string names[M_COUNT] = '{"normalization path", "alignment path", "D=0", "D=1",
    "alignment right shift", "alignment left shift", "normalization right shift",
    "multi-digit normalization shift", "subtraction", "chained operand 1",
    "chained operand 2", "inexact result", "zero result", "operand 2 not negatable",
    "exponent beyond single range"};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: sel=%0d%0d sub=%0d a=%h b=%h res=%h", what, sel_sut_a,
                 sel_sut_b, sub, sel_sut_a ? a_sut : SW'(a_ieee),
                 sel_sut_b ? b_sut : SW'(b_ieee), result);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SW-1:0] acc;
    fix_t          fa, fb, want, err, ulp;
    int            d, lz, step;
    acc  = '0;
    step = 0;
    for (int i = 0; i < 20000; i++) begin
      // restart the chain every 12 operations or when it leaves the range
      // the reference covers
      if (step == 0 || sut_exp(acc) > 60 || sut_exp(acc) < -60) begin
        step = 0;
        sel_sut_a = 0; sel_sut_b = 0;
        a_ieee = rand_dbl(-200, 200);
        b_ieee = a_ieee;
        b_ieee[62:52] = 11'(int'(a_ieee[62:52]) + int'($urandom % 21) - 10);
        b_ieee[51:0]  = (i % 5 == 0) ? a_ieee[51:0] : {$urandom, $urandom};
        b_ieee[63]    = 1'($urandom);
        sub = 1'($urandom);
        a_sut = '0; b_sut = '0;
      end else if ($urandom % 3 != 0) begin
        sel_sut_a = 1; sel_sut_b = 0;
        a_sut = acc; b_sut = '0;
        a_ieee = '0;
        b_ieee = near_dbl(acc, -60, 6);
        sub = 1'($urandom);
      end else begin
        sel_sut_a = 0; sel_sut_b = 1;
        b_sut = acc; a_sut = '0;
        b_ieee = '0;
        a_ieee = near_dbl(acc, -60, 6);
        sub = ($urandom % 4 == 0);
      end
      step = (step + 1) % 12;
      #1;
      fa   = sel_sut_a ? sut_fix(a_sut) : ieee_fix(a_ieee);
      fb   = sel_sut_b ? sut_fix(b_sut) : ieee_fix(b_ieee);
      want = sub ? fa - fb : fa + fb;
      if (neg_invalid) begin
        seen[M_NEG_INVALID]++;
        check(sel_sut_b && sub, "negation flag only for a chained operand 2");
        acc = sel_sut_b ? b_sut : a_sut;
        continue;
      end
      if (zero) begin
        check(want == 0, "zero result");
        seen[M_ZERO]++;
        step = 0;
        continue;
      end
      check(want != 0, "nonzero result");
      err = absf(sut_fix(result) - want);
      ulp = fix_t'(1) <<< (ulp_pow(result) + OFF);
      check(err <= ulp, "value within 1 ulp");
      check(2 * err <= ulp, "value within half an ulp");
      check(dig(result, N - 1) != 0, "result normalized");
      check(!ovf && !unf, "exponent in range");
      if (err != 0) seen[M_INEXACT]++;
      if (sut_exp(result) > 32 || sut_exp(result) < -32) seen[M_WIDE_EXP]++;
      d = ex(dut.f1_exp) - ex(dut.f2_exp);
      if (d < 0) d = -d;
      if (path_norm) begin
        seen[M_NORM]++;
        if (d == 0) seen[M_D0]++; else seen[M_D1]++;
        check(d <= 1, "path select");
        if (post_shift == 2'd1) seen[M_N_RIGHT]++;
        lz = ex(dut.u_add.e_l) - sut_exp(result);
        if (post_shift == 2'd2 && lz >= 2) seen[M_N_MULTI]++;
      end else begin
        seen[M_ALIGN]++;
        check(d >= 2, "path select");
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
