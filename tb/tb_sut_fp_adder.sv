// tb_sut_fp_adder: the dual-path adder core on operands produced from random
// IEEE single numbers (the converter is used here only as a stimulus
// source). Exponent differences from 0 to 40 bits reach both paths and all
// post-shifts. The redundant result must lie within one unit of its last
// digit of the exact sum or difference, a nonzero result must have a
// nonzero leading digit, and an exact cancellation must raise zero.
module tb_sut_fp_adder;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  logic [31:0]           fa, fb;
  sut_num_t              na, nb;
  logic                  sub;
  sut_exp_t              e3;
  sut_digit_t [NDIG-1:0] mu3;
  logic zero, ovf, unf, neg_invalid, path_norm;
  logic [1:0] post_shift;
  sut_num_t  res;
  int checks = 0, failures = 0;

  ieee_to_sut u_ca (.ieee(fa), .exp(na.exp), .sig(na.sig));
  ieee_to_sut u_cb (.ieee(fb), .exp(nb.exp), .sig(nb.sig));

  sut_fp_adder #(.N(NDIG)) dut (
    .eps(na.exp), .mu1(na.sig), .eta(nb.exp), .mu2(nb.sig), .sub(sub),
    .e3(e3), .mu3(mu3), .zero(zero), .ovf(ovf), .unf(unf),
    .neg_invalid(neg_invalid), .path_norm(path_norm), .post_shift(post_shift));

  assign res = '{exp: e3, sig: mu3};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: a=%h b=%h sub=%0d got=%e want=%e", what, fa, fb, sub,
                 num_value(res), ieee_value(fa) + (sub ? -1.0 : 1.0) * ieee_value(fb));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real want;
    int  seen_norm = 0, seen_align = 0, seen_zero = 0;
    for (int i = 0; i < 20000; i++) begin
      fa  = rand_ieee(60, 190);
      fb  = fa;
      fb[30:23] = 8'(int'(fa[30:23]) + int'($urandom % 41) - 20);
      fb[22:0]  = (i % 9 == 0) ? fa[22:0] : 23'($urandom);
      fb[31]    = 1'($urandom);
      sub = 1'($urandom);
      #1;
      want = ieee_value(fa) + (sub ? -ieee_value(fb) : ieee_value(fb));
      if (want == 0.0) begin
        check(zero, "zero flag");
        seen_zero++;
      end else begin
        check(!zero, "no zero flag");
        check(absr(num_value(res) - want) <= ulp_of(e3), "value within 1 ulp");
        check(dval(mu3[NDIG-1]) != 0, "normalized");
      end
      check(!neg_invalid && !ovf && !unf, "no status flags");
      if (path_norm) seen_norm++; else seen_align++;
    end
    check(seen_norm > 0 && seen_align > 0 && seen_zero > 0, "coverage");
    $display("paths: normalization %0d alignment %0d, zero results %0d", seen_norm, seen_align, seen_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
