// sut_exp_diff: radix-16 exponent difference D = eps - eta of two operands in
// the SUT exponent format, with the flags that steer the dual-path adder.
//
// How it works (the document's algorithm): eta is negated by inverting all
// its twits (the exponent range [-32, 32] is symmetric, so no +1 is needed;
// posibits become negabits and back). A 6-bit ripple-carry adder then adds
// eps and the inverted eta position by position; at the weight-1 position
// there are four bits, so the adder takes three of them (e'2, e''2 of eps
// and the inverted e'2 of eta) and the fourth, the inverted e''2 of eta, is
// kept beside the sum as d0''. Read as unsigned numbers the sum is
// D + 64 = 64*d6 + v + d0'' with v the 6 sum bits below d6:
//   d6 = 1 : D >= 0 and |D| = v + d0''
//   d6 = 0 : D <= 0 and |D| = ~v + ~d0''   (64 - v - d0'')
// (numbers for the single format, EW = 7; for EW twits the adder has EW-1
// bits and 64 becomes 2^(EW-1)).
// so the magnitude is a 6-bit field plus one extra bit of weight 1, which is
// what drives the alignment shifter. mag is that sum, formed here for the
// flags and for the tests; the shifter itself uses mag_v and mag_x.
// Outputs: f1_ge (operand 1 has the larger or equal exponent), eq0 (D = 0),
// le1 (|D| <= 1, selects the normalization path). Combinational.
module sut_exp_diff #(
  parameter int EW = 7            // exponent twits: 7 single, 10 double
) (
  input  logic [EW-1:0] eps,
  input  logic [EW-1:0] eta,
  output logic          f1_ge,
  output logic [EW-2:0] mag_v,
  output logic          mag_x,
  output logic [EW-1:0] mag,
  output logic          eq0,
  output logic          le1
);

  localparam int AW = EW - 1;     // adder width (6 for single)

  logic [EW-1:0] eta_n;
  logic [AW-1:0] a, b;
  logic [AW:0]   c;
  logic [AW-1:0] v;
  logic          d6, d0pp;

  assign eta_n = ~eta;
  assign a     = eps[EW-1:1];
  assign b     = eta_n[EW-1:1];

  // Ripple-carry adder, carry-in is the extra negabit of eps.
  assign c[0] = eps[0];
  for (genvar i = 0; i < AW; i++) begin : g_fa
    assign v[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign d6    = c[AW];
  assign d0pp  = eta_n[0];
  assign f1_ge = d6;
  assign mag_v = d6 ? v : ~v;
  assign mag_x = d6 ? d0pp : ~d0pp;
  assign mag   = {1'b0, mag_v} + EW'(mag_x);
  assign eq0   = (mag == '0);
  assign le1   = (mag <= EW'(1));

endmodule
