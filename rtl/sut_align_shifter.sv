// sut_align_shifter: alignment shifter of the alignment path. Shifts the
// significand of the operand with the smaller exponent right by k digits
// and keeps what is needed for rounding:
//   guard  : the most significant shifted-out digit (it may be shifted back
//            by the one-digit left shift after the addition),
//   rnd    : the next shifted-out digit,
//   sticky : the sign (negative / zero / positive) of all digits further
//            right, folded by a chain of sticky cells.
// The shift amount arrives as the exponent-difference magnitude in the form
// the exponent subtractor delivers it: an MW-bit field mag_v plus an extra
// bit mag_x of weight 1. Any amount of N or more moves every digit out of
// the significand, as the document notes; but since guard and round take
// two more digit slots, amounts N and N+1 still keep the top digits as
// round or guard digit, so the full amount is used and only amounts above
// N+2 (all digits in the sticky chain) are clamped to N+2. Shifting in is with zero digits.
// The document gives the function; the mux-per-digit shifter and the
// unrolled sticky chain are this design's. Combinational.
module sut_align_shifter
  import sut_pkg::*;
#(
  parameter int N  = NDIG,
  parameter int MW = 6            // width of the magnitude field
) (
  input  sut_digit_t [N-1:0] d_in,
  input  logic [MW-1:0]      mag_v,
  input  logic               mag_x,
  output sut_digit_t [N-1:0] d_out,
  output sut_digit_t         guard,
  output sut_digit_t         rnd,
  output sticky_t            sticky
);

  localparam int KMAX = N + 2;
  localparam int W    = 2 * N + 2;
  localparam int KW   = $clog2(KMAX + 1);

  sut_digit_t [W-1:0] ext;
  sut_digit_t [W-1:0] sh;
  logic [KW-1:0]      k;
  sticky_t  [N:0]     sc;

  logic [MW:0] total;

  assign total = {1'b0, mag_v} + (MW+1)'(mag_x);
  assign k     = (32'(total) > KMAX) ? KW'(KMAX) : KW'(total);

  always_comb begin
    ext = '0;
    ext[W-1 -: N] = d_in;
    for (int j = 0; j < N + 2; j++) ext[j] = DIGIT_ZERO;
    for (int j = 0; j < W; j++) begin
      if (j + int'(k) < W) sh[j] = ext[j + int'(k)];
      else                 sh[j] = DIGIT_ZERO;
    end
  end

  assign d_out = sh[W-1 -: N];
  assign guard = sh[N+1];
  assign rnd   = sh[N];

  assign sc[0] = STICKY_ZERO;
  for (genvar j = 0; j < N; j++) begin : g_sticky
    sut_sticky_cell u_cell (.s_in(sc[j]), .z_in(sh[j]), .s_out(sc[j+1]));
  end
  assign sticky = sc[N];

endmodule
