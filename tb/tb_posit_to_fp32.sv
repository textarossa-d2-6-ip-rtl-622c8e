// tb_posit_to_fp32 -- exhaustive check of posit to binary32 conversion.
//
// Every 8-bit word for Posit<8,0> and every 16-bit word for Posit<16,0>
// (defaults) and Posit<16,1> is converted and compared bit for bit with the
// reference: the posit value from a bit walk, written as binary32 (exact for
// these sizes), +0.0 for zero and 0x7FC00000 for NaR.
module tb_posit_to_fp32;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  p8;
  logic [15:0] p16;
  logic [31:0] f8, f160, f161;

  posit_to_fp32 #(.N(8),  .ES(0)) dut8   (.posit(p8),  .fp(f8));
  posit_to_fp32                   dut160 (.posit(p16), .fp(f160));
  posit_to_fp32 #(.N(16), .ES(1)) dut161 (.posit(p16), .fp(f161));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    p8 = '0;
    for (int v = 0; v < 65536; v++) begin
      p16 = 16'(v);
      if (v < 256) p8 = 8'(v);
      #1;
      e = ref_posit_to_fp32(64'(v), 16, 0);
      checks++;
      if (f160 !== e) begin
        failures++;
        if (failures < 20) $display("P160 %h: got %h expected %h", p16, f160, e);
      end
      e = ref_posit_to_fp32(64'(v), 16, 1);
      checks++;
      if (f161 !== e) begin
        failures++;
        if (failures < 20) $display("P161 %h: got %h expected %h", p16, f161, e);
      end
      if (v < 256) begin
        e = ref_posit_to_fp32(64'(v), 8, 0);
        checks++;
        if (f8 !== e) begin
          failures++;
          if (failures < 20) $display("P8 %h: got %h expected %h", p8, f8, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
