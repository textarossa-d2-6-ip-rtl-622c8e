// posit_unpack -- splits a Posit<N,ES> into sign, exponent and fraction.
//
// This is the front half of the posit-to-binary32 datapath, shared by every
// converter that reads a posit. The absolute value is taken (posits are two's
// complement), the regime decoder finds the run length l and the regime value
// k of the body, and the body is shifted left by l+1 so that the exponent bits
// and then the fraction sit at the top. Exponent bits cut off by a long regime
// read as zeros. The result is E = k * 2^ES + e and the fraction left aligned
// in N-1 bits. Zero and NaR (only the sign bit set) are flagged.
//
// Purely combinational.
//   posit                 : input
//   sign, is_zero, is_nar : class of the input
//   exp                   : signed exponent E (value = 1.frac * 2^E)
//   frac                  : fraction bits after the hidden one, left aligned
module posit_unpack #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0
) (
  input  logic        [N-1:0]           posit,
  output logic                          sign,
  output logic                          is_zero,
  output logic                          is_nar,
  output logic signed [ppu_pkg::EW-1:0] exp,
  output logic        [N-2:0]           frac
);
  logic        [N-1:0]           abs_val;
  logic        [$clog2(N):0]   rlen;
  logic signed [ppu_pkg::EW-1:0] k;
  logic        [N-2:0]           rest;
  logic        [ppu_pkg::EW-1:0] e;

  assign sign    = posit[N-1];
  assign is_zero = (posit == '0);
  assign is_nar  = (posit == {1'b1, {(N-1){1'b0}}});
  assign abs_val = sign ? -posit : posit;

  posit_regime_decode #(.N(N)) u_regime (
    .body (abs_val[N-2:0]),
    .len  (rlen),
    .k    (k)
  );

  always_comb begin
    // Left shifter by regime length + 1 (the terminating bit).
    rest = abs_val[N-2:0] << (rlen + 1'b1);
    e    = '0;
    if (ES > 0) e = ppu_pkg::EW'(rest >> (N - 1 - ES));
    exp  = (k <<< ES) + $signed(e);
    frac = rest << ES;
  end
endmodule
