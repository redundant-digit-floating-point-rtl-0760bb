// sut_lzd_norm: leading-zero-digit detection and normalization left shift of
// the normalization path.
//
// Counts the zero digits at the top of the sum s (0..N) and shifts the sum
// left by that count, moving the guard digit (the digit shifted out by the
// one-digit alignment shift, or zero) in first and zero digits after it.
// Because an SUT sum has at most one insignificant leading digit (a single
// 1 or -1), an ordinary leading-zero detector on digit values is enough; no
// recoding is needed. all_zero is set when the sum and the guard digit are
// all zero. The document gives the function; the priority encoder and the
// mux shifter are this design's. Combinational.
module sut_lzd_norm
  import sut_pkg::*;
#(
  parameter int N  = NDIG,
  parameter int CW = $clog2(N + 1)
) (
  input  sut_digit_t [N-1:0] s,
  input  sut_digit_t         guard,
  output sut_digit_t [N-1:0] d_out,
  output logic [CW-1:0]      lz,
  output logic               all_zero
);

  localparam int W = 2 * N + 1;

  logic [N-1:0]       nz;
  sut_digit_t [W-1:0] ext;

  for (genvar i = 0; i < N; i++) begin : g_nz
    assign nz[i] = ~digit_is_zero(s[i]);
  end

  always_comb begin
    lz = CW'(N);
    for (int i = 0; i < N; i++) begin
      if (nz[i]) lz = CW'(N - 1 - i);
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) ext[j] = DIGIT_ZERO;
    ext[N]        = guard;
    ext[W-1 -: N] = s;
    for (int j = 0; j < N; j++) d_out[j] = ext[N + 1 + j - int'(lz)];
  end

  assign all_zero = (nz == '0) & digit_is_zero(guard);

endmodule
