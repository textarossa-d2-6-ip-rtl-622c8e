// posit_regime_decode -- regime decoder for Posit<N,ES> unpacking.
//
// Takes the N-1 bit body of a non-negative posit (the bits below the sign)
// and returns the regime run length l and the regime value k. As in the
// published design it uses a find-first-set: the body is inverted when its
// first bit is one (turning the search into a find-first-unset), the index i
// of the highest set bit is found, and l = (N-2) - i (l = 14 - i for 16-bit
// posits). A body whose bits all equal the first one has l = N-1. The value is
// k = l-1 for a ones-run and k = -l for a zeros-run.
//
// Purely combinational.
//   body : posit bits [N-2:0] of a non-negative posit
//   len  : run length l, 1..N-1 (terminating bit not included)
//   k    : regime value
module posit_regime_decode #(
  parameter int unsigned N = 16
) (
  input  logic        [N-2:0]           body,
  output logic        [$clog2(N):0]   len,
  output logic signed [ppu_pkg::EW-1:0] k
);
  localparam int LW = $clog2(N) + 1;

  logic        [N-2:0]         x;
  logic                        found;
  logic        [$clog2(N):0] idx;

  always_comb begin
    x = body[N-2] ? ~body : body;
    // Find first set: index of the most significant one of x.
    found = 1'b0;
    idx   = '0;
    for (int i = 0; i <= N - 2; i++) begin
      if (x[i]) begin
        found = 1'b1;
        idx   = LW'(i);
      end
    end
    len = found ? LW'(N - 2) - idx : LW'(N - 1);
    k   = body[N-2] ? ppu_pkg::EW'(len) - 1'b1 : -ppu_pkg::EW'(len);
  end
endmodule
