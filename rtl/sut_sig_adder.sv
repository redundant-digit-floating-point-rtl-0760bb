// sut_sig_adder: carry-free adder for two SUT significands of N digits.
// The sign is embedded in the digits, so it only ever adds; subtraction is
// done by negating an operand beforehand.
//
// How it works. Each digit position is handled on its own, in two rows:
//  Row 1 adds the two operand digits, a+b in [-18, 16], and splits the sum
//    into an outgoing transfer T in {-1, 0, 1} (T = -1 below -8, +1 above 7)
//    and an interim digit W = a+b-16T in [-8, 7], a 4-bit two's-complement
//    number w3 w2 w1 w0. T travels as a posibit c and a negabit n with
//    value c+n-1 (T=-1: 00, T=0: 01, T=+1: 11).
//  Row 2 is one full adder at the low end of each digit. It adds w0 and the
//    incoming transfer pair (c, n) from the digit to the right. Its sum bit
//    becomes the new p0 and its carry becomes the stored unibit u, because
//    w0 + c + (n-1) = sum + (2*carry - 1). The upper twits of W are kept.
// Nothing propagates further than one digit, so the delay does not depend
// on N. The least-significant digit receives no transfer; its low full
// adder gets the constant pair c = 0, n = 1 (value 0), which gives it a
// unibit u'' = w0 and p0 = ~w0 that the rounding logic later overwrites.
// The transfer out of the most significant digit is tout (c, n), with
// tout_nz set when it is not 0; the caller then shifts the sum right one
// digit. The document describes the adder only by its function and by the
// low full adder; the row-1 split used here is this design's own choice.
// Combinational.
module sut_sig_adder
  import sut_pkg::*;
#(
  parameter int N = NDIG
) (
  input  sut_digit_t [N-1:0] a,
  input  sut_digit_t [N-1:0] b,
  output sut_digit_t [N-1:0] s,
  output logic [1:0]         tout,     // {c, n}
  output logic               tout_nz
);

  logic [N:0]   tc;   // transfer posibit into digit i
  logic [N:0]   tn;   // transfer negabit into digit i
  logic [3:0]   w [N];

  assign tc[0] = 1'b0;
  assign tn[0] = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_dig
    logic signed [5:0] sum;
    logic signed [5:0] wv;
    assign sum = digit_value(a[i]) + digit_value(b[i]);
    always_comb begin
      if (sum < -6'sd8) begin
        wv        = sum + 6'sd16;
        tc[i+1]   = 1'b0;
        tn[i+1]   = 1'b0;
      end else if (sum > 6'sd7) begin
        wv        = sum - 6'sd16;
        tc[i+1]   = 1'b1;
        tn[i+1]   = 1'b1;
      end else begin
        wv        = sum;
        tc[i+1]   = 1'b0;
        tn[i+1]   = 1'b1;
      end
    end
    assign w[i] = wv[3:0];

    // Row 2: low full adder absorbing the incoming transfer.
    assign s[i].n3 = ~w[i][3];
    assign s[i].p2 =  w[i][2];
    assign s[i].p1 =  w[i][1];
    assign s[i].p0 =  w[i][0] ^ tc[i] ^ tn[i];
    assign s[i].u  = (w[i][0] & tc[i]) | (w[i][0] & tn[i]) | (tc[i] & tn[i]);
  end

  assign tout    = {tc[N], tn[N]};
  assign tout_nz = tc[N] | ~tn[N];

endmodule
