// tb_light_ppu -- checks the conversion bank through its opcode multiplexer.
//
// For every operation, including OP_NONE, it applies zero, NaR-like words and
// 3000 random operands suited to the operation, and compares the 64-bit result
// (with its zero or sign extension) with the reference model.
module tb_light_ppu;
  import ppu_pkg::*;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;

  ppu_op_e     op;
  logic [63:0] src, res;

  light_ppu dut (.op(op), .src(src), .res(res));

  task automatic check(ppu_op_e o, logic [63:0] a);
    logic [63:0] e;
    op  = o;
    src = a;
    #1;
    e = ref_ppu(o, a);
    checks++;
    if (res !== e) begin
      failures++;
      if (failures < 20) $display("op %0d src %h: got %h expected %h", o, a, res, e);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < NUM_OPS; o++) begin
      check(ppu_op_e'(o), 64'h0);
      check(ppu_op_e'(o), 64'h80);
      check(ppu_op_e'(o), 64'h8000);
      check(ppu_op_e'(o), 64'h8000_0000);
      check(ppu_op_e'(o), 64'h8000_0000_0000_0000);
      check(ppu_op_e'(o), 64'hFFFF_FFFF_7F80_0000);
      for (int i = 0; i < 3000; i++) check(ppu_op_e'(o), gen_operand(ppu_op_e'(o)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
