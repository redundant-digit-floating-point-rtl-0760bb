// sut_round: round-to-nearest-even decision of the SUT adder. Instead of an
// increment, a rounding value in {-1, 0, +1} ulp is stored in the transfer
// (unibit) slot of the least-significant digit of the normalized result,
// together with an adjusted least-significant posibit.
//
// Inputs, all taken after the normalization shift:
//   u2  : unibit transfer u'' of the LSD (its value -1 or +1),
//   lb  : least-significant posibit l_b of the LSD,
//   rc  : class r1 r0 of the round digit (the digit right of the LSD):
//         00 = -9, 01 = -8, 10 = [-7, 7], 11 = 8,
//   st  : sticky digit s' s'' (00 negative, 01 zero, 11 positive).
// Outputs r2 (the stored rounding unibit r'') and la (new posibit l_a), with
// la + (2*r2-1) = RNE(lb + (2*u2-1) + round/16 + sticky), ties to even.
// The two sum-of-products below are the document's equations, three gate
// levels deep:
//   r'' = r1 lb r0 s' + u''(r1 + lb + r0 s')
//   l_a = NOR(r1 xor lb, r0 s') + (r1 xor lb) r0 s'' + r1 lb ~r0
// Combinations that cannot occur (43 of 64) are don't-cares. Combinational.
module sut_round
  import sut_pkg::*;
(
  input  logic    u2,
  input  logic    lb,
  input  rclass_t rc,
  input  sticky_t st,
  output logic    r2,
  output logic    la
);

  logic r1, r0, x;

  assign r1 = rc[1];
  assign r0 = rc[0];
  assign x  = r1 ^ lb;

  assign r2 = (r1 & lb & r0 & st.sp) | (u2 & (r1 | lb | (r0 & st.sp)));
  assign la = ~(x | (r0 & st.sp)) | (x & r0 & st.spp) | (r1 & lb & ~r0);

endmodule
