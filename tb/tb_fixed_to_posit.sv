// tb_fixed_to_posit -- checks fixed-point to posit conversion.
//
// Q8.8 -> Posit<8,0> exhaustively; Q16.16 -> Posit<16,0> (defaults) and
// Q32.32 -> Posit<16,1> with the fixed-point image of every posit and its two
// neighbours, random words of random magnitude, zero, the most negative word
// (NaR) and the extremes. The reference searches for the largest posit whose
// exact integer image does not exceed the magnitude, clamped to
// [minpos, maxpos].
module tb_fixed_to_posit;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] x8;
  logic [31:0] x160;
  logic [63:0] x161;
  logic [7:0]  p8;
  logic [15:0] p160, p161;

  fixed_to_posit #(.N(8),  .ES(0)) dut8   (.fixed(x8),   .posit(p8));
  fixed_to_posit                   dut160 (.fixed(x160), .posit(p160));
  fixed_to_posit #(.N(16), .ES(1)) dut161 (.fixed(x161), .posit(p161));

  task automatic check16(logic [31:0] a, logic [63:0] b);
    longint unsigned e;
    x160 = a;
    x161 = b;
    #1;
    e = ref_fixed_to_posit(longint'($signed(a)), 16, 0, 16, 32);
    checks++;
    if (p160 !== e[15:0]) begin
      failures++;
      if (failures < 20) $display("Q16.16 %h: got %h expected %h", a, p160, e[15:0]);
    end
    e = ref_fixed_to_posit(longint'(b), 16, 1, 32, 64);
    checks++;
    if (p161 !== e[15:0]) begin
      failures++;
      if (failures < 20) $display("Q32.32 %h: got %h expected %h", b, p161, e[15:0]);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e;
    longint a, b;
    for (int v = 0; v < 65536; v++) begin
      x8 = 16'(v);
      #1;
      e = ref_fixed_to_posit(longint'(v), 8, 0, 8, 16);
      checks++;
      if (p8 !== e[7:0]) begin
        failures++;
        if (failures < 20) $display("Q8.8 %h: got %h expected %h", x8, p8, e[7:0]);
      end
    end
    check16(32'h0, 64'h0);
    check16(32'h8000_0000, 64'h8000_0000_0000_0000);
    check16(32'h7FFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF);
    check16(32'h8000_0001, 64'h8000_0000_0000_0001);
    check16(32'h1, 64'h1);
    check16(32'hFFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF);
    // Images of every posit and their neighbours.
    for (int v = 1; v < 65536; v++) begin
      if (v == 32768) continue;
      a = ref_posit_to_fixed(64'(v), 16, 0, 16, 32);
      b = ref_posit_to_fixed(64'(v), 16, 1, 32, 64);
      for (int d = -1; d <= 1; d++) check16(32'(a + d), 64'(b + d));
    end
    // Random words of random magnitude.
    for (int i = 0; i < 20000; i++) begin
      a = longint'($signed($urandom)) >>> $urandom_range(0, 31);
      b = {$urandom, $urandom};
      b = b >>> $urandom_range(0, 63);
      check16(32'(a), 64'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
