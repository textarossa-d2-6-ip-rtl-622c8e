// tb_posit_to_posit -- exhaustive check of the six posit/posit conversions of
// the PPU: Posit<16,0> <-> Posit<8,0>, Posit<16,1> <-> Posit<8,0> and
// Posit<16,0> <-> Posit<16,1>. Each source word is decoded by the reference
// bit walk and re-encoded by the reference search (truncation, clamped to
// [minpos, maxpos]); zero and NaR map to zero and NaR.
module tb_posit_to_posit;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] s16;
  logic [7:0]  s8;
  logic [7:0]  d8_160, d8_161;
  logic [15:0] d160_8, d161_8, d161_160, d160_161;

  posit_to_posit                                         dut_8_160   (.src(s16), .dst(d8_160));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(0))   dut_160_8   (.src(s8),  .dst(d160_8));
  posit_to_posit #(.NI(16), .ESI(0), .NO(16), .ESO(1))   dut_161_160 (.src(s16), .dst(d161_160));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(1))   dut_161_8   (.src(s8),  .dst(d161_8));
  posit_to_posit #(.NI(16), .ESI(1), .NO(8),  .ESO(0))   dut_8_161   (.src(s16), .dst(d8_161));
  posit_to_posit #(.NI(16), .ESI(1), .NO(16), .ESO(0))   dut_160_161 (.src(s16), .dst(d160_161));

  function automatic longint unsigned conv(longint unsigned p, int ni, int esi, int no, int eso);
    if (is_nar(p, ni)) return 64'd1 << (no - 1);
    return posit_of_real(posit_value(p, ni, esi), no, eso);
  endfunction

  task automatic cmp(string what, longint unsigned got, longint unsigned exp, int v);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s src %h: got %h expected %h", what, v, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s8 = '0;
    for (int v = 0; v < 65536; v++) begin
      s16 = 16'(v);
      if (v < 256) s8 = 8'(v);
      #1;
      cmp("P8<-P16.0",    64'(d8_160),   conv(64'(v), 16, 0, 8, 0),  v);
      cmp("P16.1<-P16.0", 64'(d161_160), conv(64'(v), 16, 0, 16, 1), v);
      cmp("P8<-P16.1",    64'(d8_161),   conv(64'(v), 16, 1, 8, 0),  v);
      cmp("P16.0<-P16.1", 64'(d160_161), conv(64'(v), 16, 1, 16, 0), v);
      if (v < 256) begin
        cmp("P16.0<-P8", 64'(d160_8), conv(64'(v), 8, 0, 16, 0), v);
        cmp("P16.1<-P8", 64'(d161_8), conv(64'(v), 8, 0, 16, 1), v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
