// fp32_to_posit -- IEEE binary32 to Posit<N,ES> converter.
//
// The binary32 word is split into sign, biased exponent and 23-bit mantissa.
// Since binary32 is sign-magnitude and posits are two's complement, the
// magnitude is converted first and the sign applied at the end. The unbiased
// exponent drives the regime encoder, the mantissa is shifted right under the
// regime and ORed into the body, and the NaR and two's complement multiplexers
// finish the word (see posit_pack). Mantissa bits that do not fit are
// truncated, as in the published design. Defaults give the Posit<16,0>
// converter; the PPU also instantiates it for Posit<8,0> and Posit<16,1>.
//
// Special values (this design's reading): an all-ones exponent field (Inf or
// NaN) gives NaR, an all-zero exponent field (zero or subnormal) gives posit
// zero, and the sign of a zero is dropped.
//
// Purely combinational.
//   fp    : binary32 input
//   posit : Posit<N,ES> output
module fp32_to_posit #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0
) (
  input  logic [31:0]  fp,
  output logic [N-1:0] posit
);
  logic                          sign;
  logic [7:0]                    biased;
  logic                          is_nar;
  logic                          is_zero;
  logic signed [ppu_pkg::EW-1:0] exp;

  assign sign    = fp[31];
  assign biased  = fp[30:23];
  assign is_nar  = (biased == 8'hFF);
  assign is_zero = (biased == 8'h00);
  assign exp     = $signed({2'b00, biased}) - ppu_pkg::EW'(127);

  posit_pack #(.N(N), .ES(ES), .FW(23)) u_pack (
    .sign    (sign),
    .is_zero (is_zero),
    .is_nar  (is_nar),
    .exp     (exp),
    .frac    (fp[22:0]),
    .posit   (posit)
  );
endmodule
