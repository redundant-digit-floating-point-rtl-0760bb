// tb_ieee_to_sut: checks the IEEE-to-SUT converter. For random normal
// numbers of both signs and all four exponent residues it checks that the
// SUT number has exactly the IEEE value, that the most-significant digit is
// nonzero (radix-16 normalization), that no digit has p0 = u = 0 (needed
// for carry-free negation), and that e''2 follows e'1. The same checks are
// made on a second instance built for the double format (IW = 64), where the
// value comparison is done exactly in integers.
module tb_ieee_to_sut;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  logic [31:0] ieee;
  sut_num_t    sut;
  int checks = 0, failures = 0;

  ieee_to_sut dut (.ieee(ieee), .exp(sut.exp), .sig(sut.sig));

  // double-format instance: 15 digits, 10 exponent twits
  localparam int DN = 15;
  logic [63:0]         dbl;
  logic [9:0]          dexp;
  sut_digit_t [DN-1:0] dsig;

  ieee_to_sut #(.IW(64)) dut64 (.ieee(dbl), .exp(dexp), .sig(dsig));

  // exponent value 256*e_top + sum_k (n[k]-1)*2^k + (n2b-1), k = 0..7
  function automatic int dexp_value(logic [9:0] e);
    int v;
    v = 256 * int'(e[9]) + int'(e[0]) - 1;
    for (int k = 0; k < 8; k++) v += (int'(e[k+1]) - 1) * (1 << k);
    return v;
  endfunction

  task automatic check_dbl();
    longint s, m;
    int     k;
    bit     pn;
    s = 0;
    for (int i = DN - 1; i >= 0; i--) s = s * 16 + longint'(dval(dsig[i]));
    // s * 2^(4E-56) must equal (-1)^sign * (2^52 + x) * 2^(e-1075)
    k = (int'(dbl[62:52]) - 1075) - (4 * dexp_value(dexp) - 56);
    m = {11'd0, 1'b1, dbl[51:0]};
    checks++;
    if (k < 0 || k > 8 || s != (dbl[63] ? -(m << k) : (m << k))) begin
      failures++;
      if (failures < 10) $display("FAIL double value: ieee=%h k=%0d", dbl, k);
    end
    check(dval(dsig[DN-1]) != 0, "double msd nonzero");
    pn = 1'b1;
    for (int j = 0; j < DN; j++) pn &= (dsig[j].p0 | dsig[j].u);
    check(pn, "double negatable digits");
    check(dexp[0] == dbl[53], "double e''2");
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: ieee=%h", what, ieee);
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
    bit pn;
    // fixed cases: +1.0, -1.0, 1.5 (all four residues of the exponent)
    for (int i = 0; i < 2000; i++) begin
      if (i < 8) ieee = {1'(i), 8'(124 + i / 2), 23'(i[0] ? 23'h400000 : 23'h0)};
      else       ieee = rand_ieee(1, 254);
      #1;
      check(num_value(sut) == ieee_value(ieee), "value");
      check(dval(sut.sig[NDIG-1]) != 0, "msd nonzero");
      pn = 1'b1;
      for (int j = 0; j < NDIG; j++) pn &= (sut.sig[j].p0 | sut.sig[j].u);
      check(pn, "negatable digits");
      check(sut.exp.n2b == ieee[24], "e''2");
    end
    for (int i = 0; i < 2000; i++) begin
      if (i < 8) dbl = {1'(i), 11'(1020 + i / 2), i[0] ? 52'h8000000000000 : 52'h0};
      else       dbl = {1'($urandom), 11'(1 + $urandom % 2046), 52'({$urandom, $urandom})};
      #1;
      check_dbl();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
