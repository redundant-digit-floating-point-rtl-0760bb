// sut_sticky_cell: one step of the sticky-digit update. The sticky digit
// records the sign of everything shifted past the round position:
// s' s'' = 00 negative, 01 zero, 11 positive (10 unused; s'' is a negabit
// with inverted encoding). A zero shifted-out digit leaves it unchanged; a
// positive or negative one makes it positive or negative.
//
// z and p say that the shifted-out digit (twits z3' z2' z1' z0' z0'') is
// zero or positive; the new sticky digit is s' = z s' + p and
// s'' = z s'' + p, as in the document's sticky logic. The zero test matches
// the two encodings of 0 (main part 1 with unibit -1, main part -1 with
// unibit +1); the positive test is z3' (main part >= 0) and any of z2', z1',
// z0''. Cells are chained so that a more significant digit, applied later,
// decides the sign, which is correct because a nonzero digit outweighs all
// digits to its right. Combinational; the document latches s' s'' back for
// an iterative update, this design unrolls the cells instead.
module sut_sticky_cell
  import sut_pkg::*;
(
  input  sticky_t    s_in,
  input  sut_digit_t z_in,
  output sticky_t    s_out
);

  logic z, p;

  assign z = digit_is_zero(z_in);
  assign p = digit_is_pos(z_in);

  assign s_out.sp  = (z & s_in.sp)  | p;
  assign s_out.spp = (z & s_in.spp) | p;

endmodule
