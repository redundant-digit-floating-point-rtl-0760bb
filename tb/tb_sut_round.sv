// tb_sut_round: the rounding decision.
// Part 1: the 21 rows of the rounding table (unibit u'', round class r1 r0,
// sticky s' s'', l_b -> r'', l_a), entered by hand, every X expanded.
// Part 2: every input combination that can occur is compared with
// round-to-nearest-even of V + R, where V = l_b + (2u''-1) is the part of
// the least-significant digit being rewritten and R is the round digit/16
// plus the sticky sign; the output value l_a + (2r''-1) must be that
// rounded value, ties going to the even value.
module tb_sut_round;
  import sut_pkg::*;

  logic    u2, lb, r2, la;
  rclass_t rc;
  sticky_t st;
  int checks = 0, failures = 0;

  sut_round dut (.u2(u2), .lb(lb), .rc(rc), .st(st), .r2(r2), .la(la));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows: u'', r1r0, sticky (2 = any), l_b (2 = any), r'', l_a (2 = equals l_b)
  typedef struct { int u; int r; int s; int lb; int rr; int la; } row_t;
  row_t rows[21] = '{
    '{0, 0, 3, 1, 0, 0}, '{0, 1, 0, 1, 0, 0}, '{0, 1, 1, 1, 0, 1}, '{0, 1, 2, 1, 0, 1},
    '{0, 2, 3, 2, 0, 2}, '{0, 3, 0, 2, 0, 2}, '{0, 3, 1, 0, 0, 1}, '{0, 3, 1, 1, 0, 1},
    '{0, 3, 2, 0, 0, 1}, '{0, 3, 2, 1, 1, 0}, '{1, 0, 3, 0, 0, 1}, '{1, 0, 3, 1, 1, 0},
    '{1, 1, 0, 0, 0, 1}, '{1, 1, 0, 1, 1, 0}, '{1, 1, 1, 0, 0, 1}, '{1, 1, 1, 1, 1, 1},
    '{1, 1, 2, 2, 1, 2}, '{1, 2, 3, 2, 1, 2}, '{1, 3, 0, 0, 1, 0}, '{1, 3, 1, 0, 1, 1},
    '{1, 3, 2, 0, 1, 1}};
  // sticky code index 0 -> 00 (neg), 1 -> 01 (zero), 2 -> 11 (pos), 3 -> any

  function automatic sticky_t scode(int i);
    return (i == 0) ? 2'b00 : (i == 1) ? 2'b01 : 2'b11;
  endfunction

  initial begin
    int sl, sh, bl, bh, v, tgt, got;
    int rmin, rmax, sg;
    // Part 1
    foreach (rows[n]) begin
      sl = (rows[n].s == 3) ? 0 : rows[n].s;  sh = (rows[n].s == 3) ? 2 : rows[n].s;
      bl = (rows[n].lb == 2) ? 0 : rows[n].lb; bh = (rows[n].lb == 2) ? 1 : rows[n].lb;
      for (int si = sl; si <= sh; si++)
        for (int b = bl; b <= bh; b++) begin
          u2 = 1'(rows[n].u); rc = 2'(rows[n].r); st = scode(si); lb = 1'(b);
          #1;
          checks++;
          if (r2 != 1'(rows[n].rr) || la != ((rows[n].la == 2) ? lb : 1'(rows[n].la))) begin
            failures++;
            $display("FAIL table row %0d: sticky=%b lb=%b -> r''=%b l_a=%b", n + 1, st, lb, r2, la);
          end
        end
    end
    // Part 2: value semantics, in sixteenths of an ulp (sticky adds +-1/2 sixteenth)
    for (int u = 0; u < 2; u++)
      for (int r = 0; r < 4; r++)
        for (int si = 0; si < 3; si++)
          for (int b = 0; b < 2; b++) begin
            v  = b + 2 * u - 1;
            sg = si - 1;
            // the representable range for the result is [-1, 2]
            if (v == -1 && r <= 1) continue;
            if (v == 2 && r == 3) continue;
            u2 = 1'(u); rc = 2'(r); st = scode(si); lb = 1'(b);
            #1;
            got = int'(la) + 2 * int'(r2) - 1;
            // value*32 = 32v + 2*digit + sg
            if (r == 0)      begin rmin = -18; rmax = -18; end
            else if (r == 1) begin rmin = -16; rmax = -16; end
            else if (r == 3) begin rmin = 16;  rmax = 16;  end
            else             begin rmin = -14; rmax = 14;  end
            for (int rd = rmin; rd <= rmax; rd += 2) begin
              int x;
              x = 32 * v + rd + sg;
              if (x > 32 * v + 16)      tgt = v + 1;
              else if (x < 32 * v - 16) tgt = v - 1;
              else if (x == 32 * v + 16) tgt = (v % 2 == 0) ? v : v + 1;
              else if (x == 32 * v - 16) tgt = (v % 2 == 0) ? v : v - 1;
              else                       tgt = v;
              checks++;
              if (got != tgt) begin
                failures++;
                $display("FAIL rne: u''=%0d r=%0d st=%b lb=%0d digit=%0d got %0d want %0d",
                         u, r, st, b, rd / 2, got, tgt);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
