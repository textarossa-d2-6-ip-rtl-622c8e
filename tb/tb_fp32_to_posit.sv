// tb_fp32_to_posit -- checks binary32 to posit conversion for the three
// configurations of the PPU: Posit<8,0>, Posit<16,0> (defaults) and
// Posit<16,1>.
//
// Inputs: zeros of both signs, subnormals, infinities, NaNs, exact powers of
// two around every regime boundary, and random words whose exponent is drawn
// from the posit range and beyond it. Each result is compared with the
// reference model (largest posit not above the magnitude, clamped to
// [minpos, maxpos], sign applied by two's complement).
module tb_fp32_to_posit;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] fp;
  logic [7:0]  p8;
  logic [15:0] p160, p161;

  fp32_to_posit #(.N(8),  .ES(0)) dut8   (.fp(fp), .posit(p8));
  fp32_to_posit                   dut160 (.fp(fp), .posit(p160));
  fp32_to_posit #(.N(16), .ES(1)) dut161 (.fp(fp), .posit(p161));

  task automatic check_one(logic [31:0] f);
    longint unsigned e8, e160, e161;
    fp = f;
    #1;
    e8   = ref_fp32_to_posit(f, 8, 0);
    e160 = ref_fp32_to_posit(f, 16, 0);
    e161 = ref_fp32_to_posit(f, 16, 1);
    checks += 3;
    if (p8 !== e8[7:0]) begin
      failures++;
      if (failures < 20) $display("P8   fp=%h got %h expected %h", f, p8, e8[7:0]);
    end
    if (p160 !== e160[15:0]) begin
      failures++;
      if (failures < 20) $display("P160 fp=%h got %h expected %h", f, p160, e160[15:0]);
    end
    if (p161 !== e161[15:0]) begin
      failures++;
      if (failures < 20) $display("P161 fp=%h got %h expected %h", f, p161, e161[15:0]);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    // Special values.
    check_one(32'h0000_0000);  // +0
    check_one(32'h8000_0000);  // -0
    check_one(32'h0000_0001);  // subnormal
    check_one(32'h807F_FFFF);  // negative subnormal
    check_one(32'h7F80_0000);  // +Inf
    check_one(32'hFF80_0000);  // -Inf
    check_one(32'h7FC0_0000);  // NaN
    check_one(32'hFFFF_FFFF);  // NaN
    check_one(32'h3F80_0000);  // 1.0
    check_one(32'hBF80_0000);  // -1.0
    check_one(32'h7F7F_FFFF);  // max float
    check_one(32'h0080_0000);  // min normal
    // Powers of two and their neighbours across the whole posit range.
    for (int e = -40; e <= 40; e++) begin
      check_one({1'b0, 8'(e + 127), 23'h0});
      check_one({1'b1, 8'(e + 127), 23'h0});
      check_one({1'b0, 8'(e + 127), 23'h7F_FFFF});
      check_one({1'b1, 8'(e + 127), 23'h40_0000});
    end
    // Random values, exponent mostly inside [-35, 35].
    for (int i = 0; i < 20000; i++) begin
      r = $urandom;
      if (i % 4 != 0) r[30:23] = 8'(127 + int'($urandom_range(0, 70)) - 35);
      check_one(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
