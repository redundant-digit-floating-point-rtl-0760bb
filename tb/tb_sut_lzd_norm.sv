// tb_sut_lzd_norm: sums with 0..7 forced leading zero digits (zero encoded
// both ways) and a random guard digit. Checks the count, the all-zero flag
// and that the shifted significand equals (sum*16 + guard) * 16^(lz-1) when
// lz > 0, or the sum itself when lz = 0.
module tb_sut_lzd_norm;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  localparam int CW = $clog2(NDIG + 1);
  localparam sut_digit_t ZALT = 5'b01111;  // -1 + 1 = 0

  sut_digit_t [NDIG-1:0] s, dout;
  sut_digit_t            guard;
  logic [CW-1:0]         lz;
  logic                  all_zero;
  int checks = 0, failures = 0;

  sut_lzd_norm #(.N(NDIG)) dut (.s(s), .guard(guard), .d_out(dout), .lz(lz), .all_zero(all_zero));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: s=%h g=%h lz=%0d", what, s, guard, lz);
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
    int     nlz, exp_lz;
    longint v;
    for (int i = 0; i < 4000; i++) begin
      nlz = i % (NDIG + 1);
      for (int j = 0; j < NDIG; j++) begin
        if (j >= NDIG - nlz) s[j] = ($urandom % 2) ? DIGIT_ZERO : ZALT;
        else                 s[j] = rand_digit(1'b0);
      end
      guard = ($urandom % 4 == 0) ? DIGIT_ZERO : rand_digit(1'b0);
      #1;
      exp_lz = 0;
      for (int j = NDIG - 1; j >= 0 && dval(s[j]) == 0; j--) exp_lz++;
      check(int'(lz) == exp_lz, "count");
      check(all_zero == (exp_lz == NDIG && dval(guard) == 0), "all_zero");
      if (exp_lz == 0) v = sig_int(s);
      else begin
        v = sig_int(s) * 16 + longint'(dval(guard));
        for (int j = 1; j < exp_lz; j++) v = v * 16;
      end
      check(sig_int(dout) == v, "shifted value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
