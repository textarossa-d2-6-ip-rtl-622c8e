// posit_to_fp32 -- Posit<N,ES> to IEEE binary32 converter.
//
// The absolute posit value goes to the regime decoder; its value (with the
// exponent bits, for ES > 0) plus the bias 127 gives the binary32 exponent,
// and the body shifted left by regime length + 1 gives the mantissa, left
// aligned in 23 bits with zeros below. The sign is taken straight from the
// posit. Every posit of up to 24 bits with a regime range inside binary32 is
// exact in binary32, so nothing is rounded. Zero gives +0.0 and NaR gives the
// canonical quiet NaN 0x7FC00000 (this design's choice). Defaults give the
// Posit<16,0> converter.
//
// Purely combinational.
//   posit : Posit<N,ES> input
//   fp    : binary32 output
module posit_to_fp32 #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0
) (
  input  logic [N-1:0] posit,
  output logic [31:0]  fp
);
  logic                          sign;
  logic                          is_zero;
  logic                          is_nar;
  logic signed [ppu_pkg::EW-1:0] exp;
  logic        [N-2:0]           frac;
  logic        [ppu_pkg::EW-1:0] biased;

  posit_unpack #(.N(N), .ES(ES)) u_unpack (
    .posit   (posit),
    .sign    (sign),
    .is_zero (is_zero),
    .is_nar  (is_nar),
    .exp     (exp),
    .frac    (frac)
  );

  always_comb begin
    biased = exp + ppu_pkg::EW'(127);
    if (is_nar)       fp = 32'h7FC0_0000;
    else if (is_zero) fp = 32'h0000_0000;
    else              fp = {sign, biased[7:0], frac, {(23 - (N - 1)){1'b0}}};
  end
endmodule
