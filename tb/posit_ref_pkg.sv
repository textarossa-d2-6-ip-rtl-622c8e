// posit_ref_pkg -- reference model used by the testbenches.
//
// Written from the posit definition alone, without the structure of the RTL:
// a posit is decoded by walking its bits one at a time (sign, regime run,
// terminating bit, up to ES exponent bits padded with zeros, fraction), and
// conversions into a posit are found by a binary search for the largest
// positive posit whose value does not exceed the magnitude (truncation), with
// the result clamped to [minpos, maxpos]. The special-value conventions
// mirror the ones documented in the RTL headers.
package posit_ref_pkg;

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic bit is_nar(longint unsigned p, int n);
    return p == (64'd1 << (n - 1));
  endfunction

  // Value of a posit (NaR must be excluded by the caller).
  function automatic real posit_value(longint unsigned p, int n, int es);
    longint unsigned mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    bit   s;
    bit   b;
    int   i, l, k, e, f_bits;
    longint unsigned f;
    real  v;
    p = p & mask;
    if (p == 0) return 0.0;
    s = p[n-1];
    if (s) p = (~p + 1) & mask;
    i = n - 2;
    b = p[i];
    l = 0;
    while (i >= 0 && p[i] == b) begin l++; i--; end
    i--;                                  // skip terminating bit
    k = b ? l - 1 : -l;
    e = 0;
    for (int j = 0; j < es; j++) begin
      e = e * 2;
      if (i >= 0) begin e = e + int'(p[i]); i--; end
    end
    f = 0; f_bits = 0;
    while (i >= 0) begin f = f * 2 + longint'(p[i]); f_bits++; i--; end
    v = pow2(k * (1 << es) + e) * (1.0 + real'(f) / pow2(f_bits));
    return s ? -v : v;
  endfunction

  // Largest positive posit with value <= a (a > 0), clamped to [minpos, maxpos].
  function automatic longint unsigned posit_floor(real a, int n, int es);
    longint unsigned lo = 1;
    longint unsigned hi = (64'd1 << (n - 1)) - 1;
    longint unsigned mid;
    if (posit_value(hi, n, es) <= a) return hi;
    if (a < posit_value(1, n, es))   return 1;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (posit_value(mid, n, es) <= a) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  // Posit for a signed real: truncate the magnitude, then negate.
  function automatic longint unsigned posit_of_real(real v, int n, int es);
    longint unsigned mask = (64'd1 << n) - 1;
    longint unsigned p;
    if (v == 0.0) return 0;
    p = posit_floor(v < 0.0 ? -v : v, n, es);
    return v < 0.0 ? ((~p + 1) & mask) : p;
  endfunction

  // binary32 bits of a real that binary32 holds exactly.
  function automatic bit [31:0] fp32_of_real(real v);
    bit  s = (v < 0.0);
    real a = s ? -v : v;
    int  e = 0;
    if (v == 0.0) return 32'h0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    return {s, 8'(e + 127), 23'($rtoi((a - 1.0) * 8388608.0))};
  endfunction

  // Value of a normal binary32 word.
  function automatic real real_of_fp32(bit [31:0] f);
    real v = pow2(int'(f[30:23]) - 127) * (1.0 + real'(f[22:0]) / 8388608.0);
    return f[31] ? -v : v;
  endfunction

  // Reference binary32 -> posit (Inf/NaN -> NaR, zero/subnormal -> 0).
  function automatic longint unsigned ref_fp32_to_posit(bit [31:0] f, int n, int es);
    if (f[30:23] == 8'hFF) return 64'd1 << (n - 1);
    if (f[30:23] == 8'h00) return 0;
    return posit_of_real(real_of_fp32(f), n, es);
  endfunction

  // Reference posit -> binary32 (NaR -> 0x7FC00000).
  function automatic bit [31:0] ref_posit_to_fp32(longint unsigned p, int n, int es);
    if (is_nar(p, n)) return 32'h7FC0_0000;
    return fp32_of_real(posit_value(p, n, es));
  endfunction

  // Reference posit -> fixed with fb fraction bits in w bits, sign-extended to 64.
  function automatic longint ref_posit_to_fixed(longint unsigned p, int n, int es, int fb, int w);
    real    v;
    longint r;
    if (is_nar(p, n)) return -(64'sd1 <<< (w - 1));
    v = posit_value(p, n, es) * pow2(fb);
    r = longint'(v);                       // exact for the default layouts
    return r;
  endfunction

  // Reference fixed -> posit; the comparison is done on exact integers.
  function automatic longint unsigned ref_fixed_to_posit(longint x, int n, int es, int fb, int w);
    longint unsigned mask = (64'd1 << n) - 1;
    longint unsigned mag;
    longint unsigned lo, hi, mid;
    bit neg;
    if (w < 64) x = (x <<< (64 - w)) >>> (64 - w);  // sign-extend from w bits
    if (x == 0) return 0;
    if (w == 64 ? (x == 64'sh8000_0000_0000_0000) : (x == -(64'sd1 <<< (w - 1))))
      return 64'd1 << (n - 1);
    neg = x < 0;
    mag = neg ? -x : x;
    lo = 1; hi = (64'd1 << (n - 1)) - 1;
    if (fixed_image(hi, n, es, fb) <= mag)      lo = hi;
    else if (mag < fixed_image(1, n, es, fb))   lo = 1;
    else begin
      while (hi - lo > 1) begin
        mid = (lo + hi) / 2;
        if (fixed_image(mid, n, es, fb) <= mag) lo = mid; else hi = mid;
      end
    end
    return neg ? ((~lo + 1) & mask) : lo;
  endfunction

  // posit value times 2^fb as an exact integer (positive posits whose image
  // is an integer; smaller ones are compared as 0 with a flag bit).
  function automatic longint unsigned fixed_image(longint unsigned p, int n, int es, int fb);
    real v = posit_value(p, n, es) * pow2(fb);
    if (v < 1.0) return 0;
    return longint'(v);
  endfunction

  // Expected rd value of a light PPU operation on the source operand.
  function automatic logic [63:0] ref_ppu(ppu_pkg::ppu_op_e op, logic [63:0] a);
    longint unsigned r;
    case (op)
      ppu_pkg::OP_S_P8:      return {32'b0, ref_posit_to_fp32(64'(a[7:0]), 8, 0)};
      ppu_pkg::OP_S_P160:    return {32'b0, ref_posit_to_fp32(64'(a[15:0]), 16, 0)};
      ppu_pkg::OP_S_P161:    return {32'b0, ref_posit_to_fp32(64'(a[15:0]), 16, 1)};
      ppu_pkg::OP_P8_S:      return ref_fp32_to_posit(a[31:0], 8, 0);
      ppu_pkg::OP_P160_S:    return ref_fp32_to_posit(a[31:0], 16, 0);
      ppu_pkg::OP_P161_S:    return ref_fp32_to_posit(a[31:0], 16, 1);
      ppu_pkg::OP_H_P8:      return ref_posit_to_fixed(64'(a[7:0]), 8, 0, 8, 16);
      ppu_pkg::OP_W_P160:    return ref_posit_to_fixed(64'(a[15:0]), 16, 0, 16, 32);
      ppu_pkg::OP_L_P161:    return ref_posit_to_fixed(64'(a[15:0]), 16, 1, 32, 64);
      ppu_pkg::OP_P8_H:      return ref_fixed_to_posit(longint'(a[15:0]), 8, 0, 8, 16);
      ppu_pkg::OP_P160_W:    return ref_fixed_to_posit(longint'(a[31:0]), 16, 0, 16, 32);
      ppu_pkg::OP_P161_L:    return ref_fixed_to_posit(longint'(a), 16, 1, 32, 64);
      ppu_pkg::OP_P8_P160:   return ref_posit_to_posit(64'(a[15:0]), 16, 0, 8, 0);
      ppu_pkg::OP_P160_P8:   return ref_posit_to_posit(64'(a[7:0]), 8, 0, 16, 0);
      ppu_pkg::OP_P161_P160: return ref_posit_to_posit(64'(a[15:0]), 16, 0, 16, 1);
      ppu_pkg::OP_P161_P8:   return ref_posit_to_posit(64'(a[7:0]), 8, 0, 16, 1);
      ppu_pkg::OP_P8_P161:   return ref_posit_to_posit(64'(a[15:0]), 16, 1, 8, 0);
      ppu_pkg::OP_P160_P161: return ref_posit_to_posit(64'(a[15:0]), 16, 1, 16, 0);
      default:               return 64'b0;
    endcase
  endfunction

  function automatic longint unsigned ref_posit_to_posit(longint unsigned p, int ni, int esi,
                                                         int no, int eso);
    if (is_nar(p, ni)) return 64'd1 << (no - 1);
    return posit_of_real(posit_value(p, ni, esi), no, eso);
  endfunction

  // Instruction word of an operation, from the published field values.
  function automatic logic [31:0] encode_ppu(ppu_pkg::ppu_op_e op, logic [4:0] rd, logic [4:0] rs1);
    logic [6:0] f7;
    logic [4:0] rs2;
    logic [2:0] f3;
    case (op)
      ppu_pkg::OP_S_P8:      {f7, rs2, f3} = {7'b1100000, 5'b00010, 3'b000};
      ppu_pkg::OP_S_P160:    {f7, rs2, f3} = {7'b1100000, 5'b00011, 3'b000};
      ppu_pkg::OP_S_P161:    {f7, rs2, f3} = {7'b1100000, 5'b00011, 3'b010};
      ppu_pkg::OP_P8_S:      {f7, rs2, f3} = {7'b1101000, 5'b00010, 3'b000};
      ppu_pkg::OP_P160_S:    {f7, rs2, f3} = {7'b1101000, 5'b00011, 3'b000};
      ppu_pkg::OP_P161_S:    {f7, rs2, f3} = {7'b1101000, 5'b00011, 3'b010};
      ppu_pkg::OP_H_P8:      {f7, rs2, f3} = {7'b1100000, 5'b00010, 3'b001};
      ppu_pkg::OP_W_P160:    {f7, rs2, f3} = {7'b1100000, 5'b00011, 3'b001};
      ppu_pkg::OP_L_P161:    {f7, rs2, f3} = {7'b1100000, 5'b00011, 3'b011};
      ppu_pkg::OP_P8_H:      {f7, rs2, f3} = {7'b1101000, 5'b00010, 3'b001};
      ppu_pkg::OP_P160_W:    {f7, rs2, f3} = {7'b1101000, 5'b00011, 3'b001};
      ppu_pkg::OP_P161_L:    {f7, rs2, f3} = {7'b1101000, 5'b00011, 3'b011};
      ppu_pkg::OP_P8_P160:   {f7, rs2, f3} = {7'b1100000, 5'b00010, 3'b100};
      ppu_pkg::OP_P160_P8:   {f7, rs2, f3} = {7'b1100000, 5'b00011, 3'b100};
      ppu_pkg::OP_P161_P160: {f7, rs2, f3} = {7'b1101000, 5'b00011, 3'b111};
      ppu_pkg::OP_P161_P8:   {f7, rs2, f3} = {7'b1101000, 5'b00010, 3'b101};
      ppu_pkg::OP_P8_P161:   {f7, rs2, f3} = {7'b1100000, 5'b00011, 3'b110};
      ppu_pkg::OP_P160_P161: {f7, rs2, f3} = {7'b1101000, 5'b00011, 3'b101};
      default:               {f7, rs2, f3} = {7'b1111111, 5'b11111, 3'b111};
    endcase
    return {f7, rs2, rs1, f3, rd, 7'b0001011};
  endfunction

  // Source operand suited to an operation: posit words, binary32 values with
  // an exponent near the posit range, or fixed-point words of random size.
  function automatic logic [63:0] gen_operand(ppu_pkg::ppu_op_e op);
    logic [63:0] a = {$urandom, $urandom};
    case (op)
      ppu_pkg::OP_P8_S, ppu_pkg::OP_P160_S, ppu_pkg::OP_P161_S:
        if ($urandom_range(0, 7) != 0) a[30:23] = 8'(127 + int'($urandom_range(0, 64)) - 32);
      ppu_pkg::OP_P8_H:    a = a >>> $urandom_range(0, 15);
      ppu_pkg::OP_P160_W:  a = a >>> $urandom_range(0, 31);
      ppu_pkg::OP_P161_L:  a = a >>> $urandom_range(0, 63);
      default: ;
    endcase
    return a;
  endfunction

endpackage
