// tb_sut_sticky_cell: exhaustive over the 32 digit encodings and the three
// sticky states; the new sticky digit must keep the old state for a zero
// digit and take the digit's sign otherwise.
module tb_sut_sticky_cell;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  sticky_t    s_in, s_out;
  sut_digit_t z_in;
  int checks = 0, failures = 0;

  sut_sticky_cell dut (.s_in(s_in), .z_in(z_in), .s_out(s_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sticky_t exp_s;
    for (int st = 0; st < 3; st++)
      for (int d = 0; d < 32; d++) begin
        s_in = (st == 0) ? 2'b00 : (st == 1) ? 2'b01 : 2'b11;
        z_in = 5'(d);
        #1;
        if (dval(z_in) == 0)     exp_s = s_in;
        else if (dval(z_in) > 0) exp_s = 2'b11;
        else                     exp_s = 2'b00;
        checks++;
        if (s_out != exp_s) begin
          failures++;
          $display("FAIL sticky: s_in=%b digit=%0d s_out=%b", s_in, dval(z_in), s_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
