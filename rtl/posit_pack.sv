// posit_pack -- builds a Posit<N,ES> from sign, exponent and fraction.
//
// This is the lower half of the binary32-to-posit datapath, shared by every
// converter that produces a posit. The signed power-of-two exponent E is split
// into the regime value k = E >>> ES and the exponent bits e = E mod 2^ES. The
// regime encoder gives the regime bits and their length; the exponent bits and
// the fraction (the "posit mantissa") are shifted right by that length and ORed
// under the regime. A multiplexer then replaces the result with NaR when the
// source was not a real number, and a second one takes the two's complement
// when the sign is set.
//
// Fraction bits that do not fit are dropped (truncation towards zero), as in
// the published design. Values above maxpos give maxpos and values below
// minpos give minpos (a posit never rounds to zero or NaR): the saturation is
// this design's choice.
//
// Purely combinational.
//   sign, is_zero, is_nar : class of the source value
//   exp                   : signed exponent E (value = 1.frac * 2^E)
//   frac                  : fraction bits after the hidden one, left aligned
//   posit                 : result
module posit_pack #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0,
  parameter int unsigned FW = 23
) (
  input  logic                          sign,
  input  logic                          is_zero,
  input  logic                          is_nar,
  input  logic signed [ppu_pkg::EW-1:0] exp,
  input  logic        [FW-1:0]          frac,
  output logic        [N-1:0]           posit
);
  // Exponent of maxpos; -EMAX is the exponent of minpos.
  localparam logic signed [ppu_pkg::EW-1:0] EMAX = ppu_pkg::EW'((N - 2) << ES);
  localparam int TW   = ES + FW;        // exponent bits + fraction bits

  logic signed [ppu_pkg::EW-1:0] k;
  logic        [N-2:0]           regime;
  logic        [$clog2(N):0]   rlen;
  logic        [TW-1:0]          tail;
  logic        [N-2+TW:0]        shifted;
  logic        [N-2:0]           body;
  logic        [N-1:0]           unsigned_posit;

  assign k = exp >>> ES;

  posit_regime_encode #(.N(N)) u_regime (
    .k      (k),
    .regime (regime),
    .len    (rlen)
  );

  if (ES > 0) begin : g_es
    assign tail = {exp[ES-1:0], frac};
  end else begin : g_no_es
    assign tail = frac;
  end

  always_comb begin
    // Right shifter: exponent and fraction go below the regime.
    shifted = {tail, {(N-1){1'b0}}} >> rlen;
    if (exp >= EMAX)       body = '1;                       // maxpos
    else if (exp < -EMAX)  body = {{(N-2){1'b0}}, 1'b1};    // minpos
    else                   body = regime | shifted[N-2+TW -: N-1];

    // NaR / zero multiplexer, then the two's complement multiplexer.
    if (is_nar)       unsigned_posit = {1'b1, {(N-1){1'b0}}};
    else if (is_zero) unsigned_posit = '0;
    else              unsigned_posit = {1'b0, body};
    posit = (sign && !is_nar) ? -unsigned_posit : unsigned_posit;
  end
endmodule
