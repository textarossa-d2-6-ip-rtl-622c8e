// posit_to_fixed -- Posit<N,ES> to two's complement fixed-point converter.
//
// Lets a core without an FPU compute on posit data with its integer ALU. The
// fixed-point word has W bits of which FB are fraction bits. With the defaults
// FB = N * 2^ES and W = 2 * FB every posit value is exact: Posit<8,0> maps to
// a 16-bit Q8.8 (halfword), Posit<16,0> to a 32-bit Q16.16 (word) and
// Posit<16,1> to a 64-bit Q32.32 (long). For ES = 0 and |x| <= 1 the result is
// the posit word shifted left by two and sign-extended, the property the
// published design points out.
//
// The posit is unpacked; the mantissa 1.frac is placed with a single shifter
// at bit position E + FB and the sign is applied. Magnitudes beyond the word
// saturate to the largest value of that sign. NaR gives the most negative
// word 100..0, and zero gives zero. The fraction layout and these special
// cases are this design's choices.
//
// Purely combinational.
//   posit : Posit<N,ES> input
//   fixed : fixed-point output, value = fixed / 2^FB
module posit_to_fixed #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0,
  parameter int unsigned FB = N << ES,
  parameter int unsigned W  = 2 * FB
) (
  input  logic [N-1:0] posit,
  output logic [W-1:0] fixed
);
  logic                          sign;
  logic                          is_zero;
  logic                          is_nar;
  logic signed [ppu_pkg::EW-1:0] exp;
  logic        [N-2:0]           frac;
  // Mantissa {1,frac} has weight 2^-(N-1); it is placed in a W+N bit field
  // at weight 2^(E+FB-(N-1)) by one right shift of W - (E + FB - (N-1)).
  logic signed [ppu_pkg::EW+1:0] shamt;
  logic        [W+N-1:0]         placed;
  logic        [W-1:0]           mag;

  posit_unpack #(.N(N), .ES(ES)) u_unpack (
    .posit   (posit),
    .sign    (sign),
    .is_zero (is_zero),
    .is_nar  (is_nar),
    .exp     (exp),
    .frac    (frac)
  );

  always_comb begin
    shamt  = (ppu_pkg::EW+2)'(W + N - 1 - FB) - (ppu_pkg::EW+2)'(exp);
    if (shamt < 0) placed = '1;  // cannot happen for the default sizes
    else           placed = {1'b1, frac, {W{1'b0}}} >> shamt;
    if (|placed[W+N-1:W-1]) mag = {1'b0, {(W-1){1'b1}}};
    else                    mag = placed[W-1:0];

    if (is_nar)       fixed = {1'b1, {(W-1){1'b0}}};
    else if (is_zero) fixed = '0;
    else              fixed = sign ? -mag : mag;
  end
endmodule
