// ieee_to_sut: converts an IEEE 754 binary number into the internal radix-16
// SUT format (SUT digits with embedded sign, radix-16 exponent). IW = 32
// (single, the default: seven digits, 7 exponent twits) follows the
// document's worked format; IW = 64 (double: fifteen digits, 10 exponent
// twits) applies the same rules to the long format, which the document names
// but does not lay out; its digit count is this design's choice.
//
// How it works (all of it follows the conversion rules of the design):
//  * Exponent: the biased bits e7..e0 are reused unchanged; read with e6..e0
//    as inverted-encoding negabits they are the unbiased exponent e' = e-127.
//    e'7..e'2 become the radix-16 exponent; the low pair e'1 e'0 is absorbed
//    by a binary shift of the significand. (Double: e10..e0, bias 1023,
//    the same way.)
//  * Significand: 1.x22..x0 is extended by one 0 bit on the right and placed
//    in a window of N digits (4 integer bits, the rest fraction bits; 28 bits
//    for single, zero-padded on the right for double) with no shift,
//    a 1-bit right shift, a 2-bit left shift or a 1-bit left shift for
//    e'1 e'0 = 11, 10, 01, 00. The two left shifts lower the radix-16
//    exponent by one; this is stored in the extra negabit e''2 instead of
//    decrementing the exponent.
//  * Sign embedding: a negative number has every window bit inverted (one's
//    complement); the missing +1 ulp enters as the low input of the
//    least-significant digit's transfer pair.
//  * Restructuring: every 4-bit group b3 b2 b1 b0 of the window becomes a
//    digit with n3 = ~b3, p2 = b2, p1 = b1, p0 = XNOR(b0, b-1) and
//    u = OR(b0, b-1), where b-1 is the top bit of the group to the right.
//    This reproduces the digit tables of the document for both signs.
// Interface: purely combinational, ieee in, exponent and digits out.
// Zero, subnormal, infinity and NaN encodings are not given a special meaning (the document
// does not define them in the SUT format); they convert as if normal.
// Latency, as in the document: two shift levels, one XOR and one OR level.
module ieee_to_sut
  import sut_pkg::*;
#(
  parameter int IW = 32,                          // IEEE width: 32 or 64
  parameter int EB = (IW == 64) ? 11 : 8,         // IEEE exponent bits
  parameter int FB = (IW == 64) ? 52 : 23,        // IEEE fraction bits
  parameter int N  = 1 + (FB + 1 + 3) / 4,        // SUT digits (7 or 15)
  parameter int EW = EB - 1                       // SUT exponent twits
) (
  input  logic [IW-1:0]      ieee,
  output logic [EW-1:0]      exp,
  output sut_digit_t [N-1:0] sig
);

  localparam int WB = 4 * N;                      // window bits
  localparam int PB = 4 * (N - 1) - (FB + 1);     // zero padding on the right

  logic          sign;
  logic [EB-1:0] e;
  logic [FB-1:0] x;
  logic [WB-4:0] ext;    // 1 . x, extension bit 0, padding (weight of top bit 1)
  logic [WB-1:0] win;    // significand window, weight of bit WB-4 is 1
  logic [WB-1:0] wx;     // window after sign embedding

  assign sign = ieee[IW-1];
  assign e    = ieee[IW-2 -: EB];
  assign x    = ieee[FB-1:0];
  assign ext  = {1'b1, x, 1'b0, {PB{1'b0}}};

  // e'1 selects right (1) or left (0); e'0 selects even (1) or odd (0) shift.
  always_comb begin
    unique case (e[1:0])
      2'b11:   win = {3'b000, ext};                // no shift
      2'b10:   win = {4'b0000, ext[WB-4:1]};       // 1-bit right shift
      2'b01:   win = {1'b0, ext, 2'b00};           // 2-bit left shift
      default: win = {2'b00, ext, 1'b0};           // 1-bit left shift
    endcase
  end

  assign wx  = win ^ {WB{sign}};
  assign exp = {e[EB-1:2], e[1]};

  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic lower;
      lower = (j == 0) ? sign : wx[4*j-1];
      sig[j].n3 = ~wx[4*j+3];
      sig[j].p2 = wx[4*j+2];
      sig[j].p1 = wx[4*j+1];
      sig[j].p0 = ~(wx[4*j] ^ lower);
      sig[j].u  = wx[4*j] | lower;
    end
  end

endmodule
