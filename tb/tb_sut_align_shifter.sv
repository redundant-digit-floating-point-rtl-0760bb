// tb_sut_align_shifter: random significands and shift amounts (0..64, given
// as a 6-bit field plus an extra unit bit). A digit at position i must
// appear at position i-k: in the shifted significand, as the guard digit
// (i-k = -1) or as the round digit (i-k = -2); the sticky digit must give
// the sign of the value of all digits further right.
module tb_sut_align_shifter;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  sut_digit_t [NDIG-1:0] din, dout;
  sut_digit_t            guard, rnd;
  sticky_t               sticky;
  logic [5:0]            mag_v;
  logic                  mag_x;
  int checks = 0, failures = 0;

  sut_align_shifter #(.N(NDIG)) dut (.d_in(din), .mag_v(mag_v), .mag_x(mag_x),
    .d_out(dout), .guard(guard), .rnd(rnd), .sticky(sticky));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: din=%h k=%0d+%0d", what, din, mag_v, mag_x);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dig_at(int i);
    return (i >= 0 && i < NDIG) ? dval(din[i]) : 0;
  endfunction

  initial begin
    int     k;
    longint rest;
    sticky_t exp_s;
    for (int i = 0; i < 4000; i++) begin
      for (int j = 0; j < NDIG; j++) din[j] = ($urandom % 3 == 0) ? DIGIT_ZERO : rand_digit(1'b0);
      mag_v = (i % 8 == 0) ? 6'($urandom) : 6'($urandom % 10);
      mag_x = 1'($urandom);
      #1;
      k = int'(mag_v) + int'(mag_x);
      for (int j = 0; j < NDIG; j++) check(dval(dout[j]) == dig_at(j + k), "shifted digit");
      check(dval(guard) == dig_at(k - 1), "guard");
      check(dval(rnd) == dig_at(k - 2), "round");
      rest = 0;
      for (int j = NDIG - 1; j >= 0; j--) if (j <= k - 3) rest = rest * 16 + longint'(dval(din[j]));
      exp_s = (rest > 0) ? 2'b11 : (rest < 0) ? 2'b00 : 2'b01;
      check(sticky == exp_s, "sticky");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
