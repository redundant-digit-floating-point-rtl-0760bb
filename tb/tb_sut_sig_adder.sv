// tb_sut_sig_adder: random SUT significands, including runs of extreme
// digits (-9 and 8). Checks that the value of the sum digits plus the top
// transfer times 16^N equals the sum of the operand values, that tout_nz
// matches the transfer, and that the least-significant digit carries the
// neutral transfer (u = ~p0).
module tb_sut_sig_adder;
  import sut_pkg::*;
  import sut_tb_pkg::*;

  sut_digit_t [NDIG-1:0] a, b, s;
  logic [1:0]            tout;
  logic                  tout_nz;
  int checks = 0, failures = 0;

  sut_sig_adder #(.N(NDIG)) dut (.a(a), .b(b), .s(s), .tout(tout), .tout_nz(tout_nz));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%h b=%h s=%h", what, a, b, s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam sut_digit_t DM9 = 5'b00000;  // -9
  localparam sut_digit_t DP8 = 5'b11111;  // +8

  initial begin
    int t;
    for (int i = 0; i < 5000; i++) begin
      for (int j = 0; j < NDIG; j++) begin
        case (i % 5)
          0: begin a[j] = DP8; b[j] = rand_digit(1'b0); end
          1: begin a[j] = DM9; b[j] = ($urandom % 2) ? DM9 : rand_digit(1'b0); end
          default: begin a[j] = rand_digit(1'b0); b[j] = rand_digit(1'b0); end
        endcase
      end
      #1;
      t = int'(tout[1]) + int'(tout[0]) - 1;
      check(sig_int(s) + longint'(t) * (longint'(1) << (4 * NDIG)) == sig_int(a) + sig_int(b), "sum value");
      check(tout_nz == (t != 0), "tout_nz");
      check(s[0].u == ~s[0].p0, "neutral LSD transfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
