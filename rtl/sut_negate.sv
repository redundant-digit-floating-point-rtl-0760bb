// sut_negate: negates an SUT significand digit by digit, with no carry
// between digits and none inside a digit, when en is set (subtraction).
//
// Negating a digit in [-9, 8] needs a carry in general. Digits produced by
// the IEEE conversion, however, never have p0 = 0 together with u = 0
// (p0 and u come from XNOR and OR of the same two bits). For such a digit
// the negation inverts n3, p2 and p1, keeps p0, and sets the new unibit to
// NAND(p0, u): the inverted twits plus the +1 of two's complementation at
// position 0 leave p0 in place and a carry whose value, together with the
// inverted unibit, fits in one unibit. This is the document's rule; it is
// exact for every operand fresh from the converter.
// A digit with p0 = u = 0 (value -9, -7, -5, ... with u = 0 and p0 = 0) can
// occur in a result of an earlier addition; it cannot be negated this way,
// and invalid flags it (this design's addition to the document's scheme).
// Interface: combinational; en = 0 passes the significand unchanged.
module sut_negate
  import sut_pkg::*;
#(
  parameter int N = NDIG
) (
  input  logic                 en,
  input  sut_digit_t [N-1:0]   d_in,
  output sut_digit_t [N-1:0]   d_out,
  output logic                 invalid
);

  always_comb begin
    invalid = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (en) begin
        d_out[i].n3 = ~d_in[i].n3;
        d_out[i].p2 = ~d_in[i].p2;
        d_out[i].p1 = ~d_in[i].p1;
        d_out[i].p0 =  d_in[i].p0;
        d_out[i].u  = ~(d_in[i].p0 & d_in[i].u);
        invalid     = invalid | ~(d_in[i].p0 | d_in[i].u);
      end else begin
        d_out[i] = d_in[i];
      end
    end
  end

endmodule
