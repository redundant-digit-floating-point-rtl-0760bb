// tb_sut_exp_diff: exhaustive over both exponents' 128 x 128 encodings.
// Compares the sign, the magnitude (also as mag_v + mag_x), D = 0 and
// |D| <= 1 with integer arithmetic on the decoded exponents.
module tb_sut_exp_diff;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  sut_exp_t   eps, eta;
  logic       f1_ge, mag_x, eq0, le1;
  logic [5:0] mag_v;
  logic [6:0] mag;
  int checks = 0, failures = 0;

  sut_exp_diff dut (.eps(eps), .eta(eta), .f1_ge(f1_ge), .mag_v(mag_v), .mag_x(mag_x),
                    .mag(mag), .eq0(eq0), .le1(le1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: eps=%b eta=%b", what, eps, eta);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, ad;
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++) begin
        eps = 7'(i);
        eta = 7'(j);
        #1;
        d  = eval_exp(eps) - eval_exp(eta);
        ad = (d < 0) ? -d : d;
        if (d != 0) check(f1_ge == (d > 0), "sign");
        check(int'(mag) == ad, "magnitude");
        check(int'(mag_v) + int'(mag_x) == ad, "shifter control");
        check(eq0 == (d == 0), "eq0");
        check(le1 == (ad <= 1), "le1");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
