// posit_regime_encode -- regime field generator for Posit<N,ES> packing.
//
// Given the regime value k (the power of useed = 2^(2^ES)), this block
// produces the run-length coded regime as it sits in the N-1 bit posit body
// (the bits below the sign), left aligned, and the number of body bits it
// occupies, terminating bit included. For k >= 0 the regime is k+1 ones and a
// zero; for k < 0 it is -k zeros and a one. The ones-run is built as the
// published design does, by arithmetically shifting the constant 2^(N-1)
// (0x8000 for 16 bits) right by k; the zeros-run by shifting a single one
// right by -k.
//
// k is clipped to [-(N-2), N-2], the range a posit body can hold: k = N-2
// gives N-1 ones (maxpos regime), k = -(N-2) gives N-2 zeros and a one
// (minpos regime). The clipping is this design's choice; the caller
// saturates values beyond that range anyway.
//
// Purely combinational.
//   k       : signed regime value
//   regime  : body bits [N-2:0], regime left aligned, zeros below it
//   len     : body bits used by the regime, 2..N-1
module posit_regime_encode #(
  parameter int unsigned N = 16
) (
  input  logic signed [ppu_pkg::EW-1:0] k,
  output logic        [N-2:0]           regime,
  output logic        [$clog2(N):0]   len
);
  localparam logic signed [ppu_pkg::EW-1:0] KMAX = ppu_pkg::EW'(N - 2);
  localparam int LW   = $clog2(N) + 1;

  logic signed [ppu_pkg::EW-1:0] kc;
  logic signed [N-1:0]           ones_run;
  logic        [N-2:0]           zeros_run;

  always_comb begin
    if (k > KMAX)       kc = KMAX;
    else if (k < -KMAX) kc = -KMAX;
    else                kc = k;

    // k >= 0: 2^(N-1) >>> k holds k+1 ones at the top; drop the sign slot.
    ones_run  = $signed({1'b1, {(N-1){1'b0}}}) >>> kc;
    // k < 0: a one after -k zeros.
    zeros_run = {1'b1, {(N-2){1'b0}}} >> (-kc);

    if (kc >= 0) begin
      regime = ones_run[N-1:1];
      len    = (kc == KMAX) ? LW'(N - 1) : LW'(kc + 2);
    end else begin
      regime = zeros_run;
      len    = (-kc == KMAX) ? LW'(N - 1) : LW'(1 - kc);
    end
  end
endmodule
