// tb_sut_negate: checks digit-parallel negation. For random significands
// whose digits all have p0 or u set, every output digit must be the
// negated input digit; with en = 0 the significand passes unchanged; a
// digit with p0 = u = 0 must raise invalid.
module tb_sut_negate;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  logic                  en, invalid;
  sut_digit_t [NDIG-1:0] din, dout;
  int checks = 0, failures = 0;

  sut_negate #(.N(NDIG)) dut (.en(en), .d_in(din), .d_out(dout), .invalid(invalid));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: din=%h dout=%h", what, din, dout);
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
    bit bad;
    for (int i = 0; i < 3000; i++) begin
      en = (i % 4) != 0;
      bad = (i % 7) == 3;
      for (int j = 0; j < NDIG; j++) din[j] = rand_digit(1'b1);
      if (bad) din[i % NDIG] = '{n3: 1'($urandom), p2: 1'($urandom), p1: 1'($urandom), p0: 1'b0, u: 1'b0};
      #1;
      if (!en) check(dout == din, "pass-through");
      else begin
        check(invalid == bad, "invalid flag");
        for (int j = 0; j < NDIG; j++)
          if (din[j].p0 | din[j].u) check(dval(dout[j]) == -dval(din[j]), "digit negated");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
