// tb_posit_regime_decode -- exhaustive check of the regime decoder.
//
// Every 15-bit body (16-bit posits) and every 7-bit body (8-bit posits) is
// decoded and compared with a bit walk that counts the identical leading bits
// l and forms k = l-1 (ones) or -l (zeros).
module tb_posit_regime_decode;
  int checks = 0, failures = 0;

  logic [14:0] body16;
  logic [4:0]  len16;
  logic signed [ppu_pkg::EW-1:0] k16;
  logic [6:0]  body8;
  logic [3:0]  len8;
  logic signed [ppu_pkg::EW-1:0] k8;

  posit_regime_decode #(.N(16)) dut16 (.body(body16), .len(len16), .k(k16));
  posit_regime_decode #(.N(8))  dut8  (.body(body8),  .len(len8),  .k(k8));

  function automatic void walk(logic [63:0] body, int nb, output int l, output int kv);
    bit b = body[nb-1];
    int i = nb - 1;
    l = 0;
    while (i >= 0 && body[i] == b) begin l++; i--; end
    kv = b ? l - 1 : -l;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l, kv;
    body8 = '0;
    for (int v = 0; v < (1 << 15); v++) begin
      body16 = 15'(v);
      if (v < 128) body8 = 7'(v);
      #1;
      walk(64'(v), 15, l, kv);
      checks++;
      if (int'(len16) != l || int'(k16) != kv) begin
        failures++;
        if (failures < 10) $display("N=16 body %b: len %0d k %0d, expected %0d %0d", body16, len16, k16, l, kv);
      end
      if (v < 128) begin
        walk(64'(v), 7, l, kv);
        checks++;
        if (int'(len8) != l || int'(k8) != kv) begin
          failures++;
          if (failures < 10) $display("N=8 body %b: len %0d k %0d, expected %0d %0d", body8, len8, k8, l, kv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
