// fixed_to_posit -- two's complement fixed-point to Posit<N,ES> converter.
//
// Inverse of posit_to_fixed, with the same fixed-point layout: W bits of
// which FB are fraction bits (defaults: Q8.8 for Posit<8,0>, Q16.16 for
// Posit<16,0>, Q32.32 for Posit<16,1>). The magnitude is taken, a leading-one
// detector gives its position p, so that E = p - FB, and a normalising left
// shift leaves the bits below the leading one as the fraction. posit_pack
// then builds the posit, truncating fraction bits that do not fit and
// saturating at maxpos and minpos. The most negative word 100..0 maps to NaR,
// mirroring posit_to_fixed; that and the layout are this design's choices.
//
// Purely combinational.
//   fixed : fixed-point input, value = fixed / 2^FB
//   posit : Posit<N,ES> output
module fixed_to_posit #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0,
  parameter int unsigned FB = N << ES,
  parameter int unsigned W  = 2 * FB
) (
  input  logic [W-1:0] fixed,
  output logic [N-1:0] posit
);
  localparam int PW = $clog2(W) + 1;

  logic                          sign;
  logic                          is_zero;
  logic                          is_nar;
  logic [W-1:0]                  mag;
  logic [PW-1:0]                 lead;
  logic [W-1:0]                  frac;
  logic signed [ppu_pkg::EW-1:0] exp;

  assign sign    = fixed[W-1];
  assign is_zero = (fixed == '0);
  assign is_nar  = (fixed == {1'b1, {(W-1){1'b0}}});
  assign mag     = sign ? -fixed : fixed;

  always_comb begin
    // Leading-one detector.
    lead = '0;
    for (int i = 0; i < W; i++) begin
      if (mag[i]) lead = PW'(i);
    end
    exp  = ppu_pkg::EW'(lead) - ppu_pkg::EW'(FB);
    // Normalise: the leading one leaves the word, the rest is the fraction.
    frac = mag << (PW'(W) - lead);
  end

  posit_pack #(.N(N), .ES(ES), .FW(W)) u_pack (
    .sign    (sign),
    .is_zero (is_zero),
    .is_nar  (is_nar),
    .exp     (exp),
    .frac    (frac),
    .posit   (posit)
  );
endmodule
