// sut_pkg: types, constants and small helper functions shared by the
// stored-unibit-transfer (SUT) floating-point adder.
//
// An SUT digit is a radix-16 signed digit in [-9, 8]. It is held in five
// two-valued bits ("twits"):
//   n3 : negabit of weight 8 with inverted encoding (1 -> 0, 0 -> -8)
//   p2 : posibit of weight 4
//   p1 : posibit of weight 2
//   p0 : posibit of weight 1
//   u  : unibit of weight 1 (1 -> +1, 0 -> -1), the stored transfer
// value = 8*(n3-1) + 4*p2 + 2*p1 + p0 + (2*u-1).
// The first four twits form a 4-bit two's-complement "main part" in [-8, 7]
// whose sign bit is stored inverted; u is the transfer received from the
// digit to the right during the last addition.
//
// A number in the internal format is a significand of NDIG SUT digits with
// the radix point right of the most significant digit, the sign embedded in
// the digits, and a radix-16 exponent of seven twits:
//   e7 : posibit of weight 32
//   n  : negabits e'6..e'2 of weights 16, 8, 4, 2, 1 (inverted encoding)
//   n2b: extra negabit of weight 1 (e''2), used by the IEEE conversion
// exponent value = 32*e7 + sum((n[k]-1)*2^k) + (n2b-1), range [-32, 32].
// The formats follow the document; NDIG = 7 is its single-precision size.
package sut_pkg;

  localparam int NDIG = 7;  // SUT digits in a single-format significand

  typedef struct packed {
    logic n3;
    logic p2;
    logic p1;
    logic p0;
    logic u;
  } sut_digit_t;

  typedef struct packed {
    logic       e7;
    logic [4:0] n;
    logic       n2b;
  } sut_exp_t;

  typedef struct packed {
    sut_exp_t                   exp;
    sut_digit_t [NDIG-1:0]      sig;
  } sut_num_t;

  // Sticky digit: s' and s'' (inverted negabit); 00 negative, 01 zero, 11 positive.
  typedef struct packed {
    logic sp;
    logic spp;
  } sticky_t;

  // Round-digit class r1 r0: 00 -> -9, 01 -> -8, 10 -> [-7, 7], 11 -> 8.
  typedef logic [1:0] rclass_t;

  localparam sut_digit_t DIGIT_ZERO = '{n3: 1'b1, p2: 1'b0, p1: 1'b0, p0: 1'b1, u: 1'b0};
  localparam sticky_t    STICKY_ZERO = '{sp: 1'b0, spp: 1'b1};
  localparam rclass_t    RCLASS_MID  = 2'b10;

  // Arithmetic value of a digit, in [-9, 8].
  function automatic logic signed [5:0] digit_value(sut_digit_t d);
    return 6'(signed'({2'b0, d.n3, d.p2, d.p1, d.p0})) - 6'sd9
           + 6'(signed'({4'b0, d.u, 1'b0}));
  endfunction

  // Zero and positive tests on a digit (the z and p signals of the sticky logic).
  function automatic logic digit_is_zero(sut_digit_t d);
    return ( d.n3 & ~d.p2 & ~d.p1 &  d.p0 & ~d.u) |
           (~d.n3 &  d.p2 &  d.p1 &  d.p0 &  d.u);
  endfunction

  function automatic logic digit_is_pos(sut_digit_t d);
    return d.n3 & (d.p2 | d.p1 | d.u);
  endfunction

  // Round-digit class of a digit.
  function automatic rclass_t digit_rclass(sut_digit_t d);
    logic is_m9, is_m8, is_p8;
    is_m9 = ~d.n3 & ~d.p2 & ~d.p1 & ~d.p0 & ~d.u;
    is_m8 = ~d.n3 & ~d.p2 & ~d.p1 &  d.p0 & ~d.u;
    is_p8 =  d.n3 &  d.p2 &  d.p1 &  d.p0 &  d.u;
    return {~(is_m9 | is_m8), is_m8 | is_p8};
  endfunction

  // Exponent value in [-32, 32].
  function automatic logic signed [7:0] exp_value(sut_exp_t e);
    return 8'(signed'({2'b0, e.e7, e.n})) + 8'(signed'({7'b0, e.n2b})) - 8'sd32;
  endfunction

  // Encode an exponent value in [-32, 32] (values outside are clamped).
  function automatic sut_exp_t exp_encode(logic signed [7:0] v);
    sut_exp_t   e;
    logic [5:0] b;
    if (v <= -8'sd32) begin
      e.n2b = 1'b0;
      b     = 6'd0;
    end else begin
      e.n2b = 1'b1;
      b     = (v >= 8'sd32) ? 6'd63 : 6'(v + 8'sd31);
    end
    e.e7 = b[5];
    e.n  = b[4:0];
    return e;
  endfunction

endpackage
