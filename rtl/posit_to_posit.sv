// posit_to_posit -- converter between two posit configurations.
//
// Changes the size and exponent width of a posit, e.g. Posit<16,0> to
// Posit<8,0> to store data at half the size. The source is unpacked into
// sign, exponent and fraction and packed again in the destination format, so
// the regime is re-encoded for the destination useed. Widening is exact
// whenever the destination range covers the source; narrowing truncates the
// fraction towards zero and saturates at maxpos and minpos. Zero and NaR are
// kept. Defaults give Posit<16,0> to Posit<8,0>.
//
// Purely combinational.
//   src : Posit<NI,ESI> input
//   dst : Posit<NO,ESO> output
module posit_to_posit #(
  parameter int unsigned NI  = 16,
  parameter int unsigned ESI = 0,
  parameter int unsigned NO  = 8,
  parameter int unsigned ESO = 0
) (
  input  logic [NI-1:0] src,
  output logic [NO-1:0] dst
);
  logic                          sign;
  logic                          is_zero;
  logic                          is_nar;
  logic signed [ppu_pkg::EW-1:0] exp;
  logic        [NI-2:0]          frac;

  posit_unpack #(.N(NI), .ES(ESI)) u_unpack (
    .posit   (src),
    .sign    (sign),
    .is_zero (is_zero),
    .is_nar  (is_nar),
    .exp     (exp),
    .frac    (frac)
  );

  posit_pack #(.N(NO), .ES(ESO), .FW(NI - 1)) u_pack (
    .sign    (sign),
    .is_zero (is_zero),
    .is_nar  (is_nar),
    .exp     (exp),
    .frac    (frac),
    .posit   (dst)
  );
endmodule
