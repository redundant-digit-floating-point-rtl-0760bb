// sut_fp_add_top: floating-point add/subtract unit built on the redundant
// radix-16 SUT format. Each operand is either an IEEE 754 number (single for
// IW = 32, the default, or double for IW = 64),
// converted on the way in (constant time: two shift levels, an XOR and an
// OR), or a number already in the SUT format, typically the result of an
// earlier addition fed back so that chains of additions stay redundant and
// need no carry propagation and no rounding increment. The sum or
// difference leaves in the SUT format, rounded to nearest by the stored
// rounding value; conversion back to binary is left to the consumer.
//
// Interface: a_ieee / b_ieee with sel_sut_a / sel_sut_b = 0, or a_sut /
// b_sut (packed as {exponent twits, digit N-1, ..., digit 0}, each digit
// {n3, p2, p1, p0, u}; 42 bits for single, 85 for double) with the select
// set; the result uses the same packing. For the single format the vectors
// match the sut_num_t type of sut_pkg.
// sub requests f1 - f2. Subtraction of an SUT
// operand 2 is exact for converted operands and flagged by neg_invalid when
// a digit cannot be negated without a carry (see sut_negate). Status
// outputs: zero, ovf, unf, and the observed path and post-shift kind.
// Fully combinational: a register stage, if wanted, is placed by the user
// (the document does not pipeline the unit).
module sut_fp_add_top
  import sut_pkg::*;
#(
  parameter int IW = 32,                          // IEEE width: 32 or 64
  parameter int FB = (IW == 64) ? 52 : 23,        // IEEE fraction bits
  parameter int N  = 1 + (FB + 1 + 3) / 4,        // SUT digits (7 or 15)
  parameter int EW = (IW == 64) ? 10 : 7,         // SUT exponent twits
  parameter int SW = EW + 5 * N                   // SUT number width
) (
  input  logic [IW-1:0] a_ieee,
  input  logic [IW-1:0] b_ieee,
  input  logic [SW-1:0] a_sut,
  input  logic [SW-1:0] b_sut,
  input  logic          sel_sut_a,
  input  logic          sel_sut_b,
  input  logic          sub,
  output logic [SW-1:0] result,
  output logic          zero,
  output logic          ovf,
  output logic          unf,
  output logic          neg_invalid,
  output logic          path_norm,
  output logic [1:0]    post_shift
);

  logic [EW-1:0]      a_ce, b_ce, f1_exp, f2_exp, r_exp;
  sut_digit_t [N-1:0] a_cm, b_cm, f1_sig, f2_sig, r_sig;

  ieee_to_sut #(.IW(IW)) u_cva (.ieee(a_ieee), .exp(a_ce), .sig(a_cm));
  ieee_to_sut #(.IW(IW)) u_cvb (.ieee(b_ieee), .exp(b_ce), .sig(b_cm));

  assign f1_exp = sel_sut_a ? a_sut[SW-1 -: EW] : a_ce;
  assign f1_sig = sel_sut_a ? a_sut[5*N-1:0]    : a_cm;
  assign f2_exp = sel_sut_b ? b_sut[SW-1 -: EW] : b_ce;
  assign f2_sig = sel_sut_b ? b_sut[5*N-1:0]    : b_cm;

  sut_fp_adder #(.N(N), .EW(EW)) u_add (
    .eps(f1_exp), .mu1(f1_sig), .eta(f2_exp), .mu2(f2_sig), .sub(sub),
    .e3(r_exp), .mu3(r_sig), .zero(zero), .ovf(ovf), .unf(unf),
    .neg_invalid(neg_invalid), .path_norm(path_norm), .post_shift(post_shift)
  );

  assign result = {r_exp, r_sig};

endmodule
