// tb_posit_regime_encode -- checks the regime encoder for 16- and 8-bit posits.
//
// Sweeps k over and beyond the representable range and compares the regime
// bits and length with a bit-by-bit construction: for k >= 0 a run of k+1
// ones and a zero, for k < 0 a run of -k zeros and a one, written from the top
// of the N-1 bit body and cut at its end.
module tb_posit_regime_encode;
  int checks = 0, failures = 0;

  logic signed [ppu_pkg::EW-1:0] k;
  logic [14:0] reg16;
  logic [4:0]  len16;
  logic [6:0]  reg8;
  logic [3:0]  len8;

  posit_regime_encode #(.N(16)) dut16 (.k(k), .regime(reg16), .len(len16));
  posit_regime_encode #(.N(8))  dut8  (.k(k), .regime(reg8),  .len(len8));

  task automatic expect_regime(int n, int kv, output logic [63:0] bits, output int len);
    int pos = n - 2;
    int run = (kv >= 0) ? kv + 1 : -kv;
    bit b   = (kv >= 0);
    bits = '0;
    len  = 0;
    for (int i = 0; i < run && pos >= 0; i++) begin bits[pos] = b; pos--; len++; end
    if (pos >= 0) begin bits[pos] = ~b; len++; end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] eb;
    int el;
    for (int kv = -20; kv <= 20; kv++) begin
      k = ppu_pkg::EW'(kv);
      #1;
      expect_regime(16, (kv > 14) ? 14 : (kv < -14) ? -14 : kv, eb, el);
      checks++;
      if (reg16 !== eb[14:0] || int'(len16) != el) begin
        failures++;
        $display("N=16 k=%0d: regime %b len %0d, expected %b len %0d", kv, reg16, len16, eb[14:0], el);
      end
      expect_regime(8, (kv > 6) ? 6 : (kv < -6) ? -6 : kv, eb, el);
      checks++;
      if (reg8 !== eb[6:0] || int'(len8) != el) begin
        failures++;
        $display("N=8 k=%0d: regime %b len %0d, expected %b len %0d", kv, reg8, len8, eb[6:0], el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
