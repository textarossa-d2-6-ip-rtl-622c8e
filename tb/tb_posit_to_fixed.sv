// tb_posit_to_fixed -- exhaustive check of posit to fixed-point conversion.
//
// Posit<8,0> -> Q8.8 (16 bits), Posit<16,0> -> Q16.16 (32 bits, defaults) and
// Posit<16,1> -> Q32.32 (64 bits), over every input word. The reference is the
// posit value times 2^FB as an exact integer; NaR gives the most negative
// word. It also checks the shortcut for ES = 0 and |x| <= 1: the fixed-point
// word equals the posit word shifted left by two and sign-extended.
module tb_posit_to_fixed;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;
  int shortcut_hits = 0;

  logic [7:0]  p8;
  logic [15:0] p16;
  logic [15:0] x8;
  logic [31:0] x160;
  logic [63:0] x161;

  posit_to_fixed #(.N(8),  .ES(0)) dut8   (.posit(p8),  .fixed(x8));
  posit_to_fixed                   dut160 (.posit(p16), .fixed(x160));
  posit_to_fixed #(.N(16), .ES(1)) dut161 (.posit(p16), .fixed(x161));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    p8 = '0;
    for (int v = 0; v < 65536; v++) begin
      p16 = 16'(v);
      if (v < 256) p8 = 8'(v);
      #1;
      e = ref_posit_to_fixed(64'(v), 16, 0, 16, 32);
      checks++;
      if (x160 !== e[31:0]) begin
        failures++;
        if (failures < 20) $display("P160 %h: got %h expected %h", p16, x160, e[31:0]);
      end
      e = ref_posit_to_fixed(64'(v), 16, 1, 32, 64);
      checks++;
      if (x161 !== e) begin
        failures++;
        if (failures < 20) $display("P161 %h: got %h expected %h", p16, x161, e);
      end
      // |x| <= 1 for Posit<16,0>: words 0xC000..0x4000 (NaR excluded).
      if (v <= 16'h4000 || v >= 16'hC000) begin
        checks++;
        shortcut_hits++;
        if (x160 !== 32'($signed(p16)) <<< 2) begin
          failures++;
          if (failures < 20) $display("P160 shortcut %h: got %h", p16, x160);
        end
      end
      if (v < 256) begin
        e = ref_posit_to_fixed(64'(v), 8, 0, 8, 16);
        checks++;
        if (x8 !== e[15:0]) begin
          failures++;
          if (failures < 20) $display("P8 %h: got %h expected %h", p8, x8, e[15:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
