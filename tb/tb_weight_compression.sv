// tb_weight_compression -- DNN weight compression through the PPU unit.
//
// Models the storage use case of the light PPU: the binary32 weights of a
// small LeNet-5 network are packed into posits (FCVT.P8.S, FCVT.P16.0.S,
// FCVT.P16.1.S) and unpacked again (FCVT.S.P8, FCVT.S.P16.0, FCVT.S.P16.1).
// The weight count, 56010, is the one for which the published network sizes
// (224894 bytes in binary32, 112874 in posit16, 56864 in posit8) differ by
// exactly 2 and 1 bytes per weight on top of a fixed 854-byte container.
// The weights are generated here: a bell-shaped distribution with a standard
// deviation of about 0.1, as trained convolution weights typically have.
//
// Instructions are issued back to back with the consumer always ready, so
// the unit must retire one conversion per clock cycle; the test checks that
// cycle count, every packed and unpacked word against the reference model,
// the resulting storage sizes and compression factors, and prints the
// largest relative error of each format over weights of magnitude >= 2^-6.
module tb_weight_compression;
  import ppu_pkg::*;
  import posit_ref_pkg::*;

  localparam int NW       = 56010;
  localparam int OVERHEAD = 854;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  logic [31:0] in_instr = '0;
  logic [63:0] in_rs1 = '0;
  logic        out_valid;
  logic        out_ready = 1'b1;
  logic [4:0]  out_rd;
  logic [63:0] out_data;
  logic        out_illegal;

  ppu_top dut (.*);

  always #5 clk = ~clk;

  logic [31:0] weights[NW];
  logic [63:0] results[$];

  initial begin
    repeat (NW * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) results.push_back(out_data);

  // Issue one instruction per cycle on the operand list; return the cycle count.
  task automatic run_pass(ppu_op_e op, logic [63:0] operands[$], output int cycles);
    int start;
    results.delete();
    start = 0;
    foreach (operands[i]) begin
      in_instr = encode_ppu(op, 5'd10, 5'd11);
      in_rs1   = operands[i];
      in_valid = 1'b1;
      if (!in_ready) failures++;
      @(negedge clk);
      start++;
    end
    in_valid = 1'b0;
    @(negedge clk);
    start++;
    cycles = start;
  endtask

  task automatic run_format(string name, ppu_op_e pack_op, ppu_op_e unpack_op, int n, int es,
                            int bytes_per_weight);
    logic [63:0] ops[$];
    logic [63:0] packed_w[$];
    int          cycles;
    real         max_rel = 0.0, w, u;
    int          size;
    ops.delete();
    foreach (weights[i]) ops.push_back(64'(weights[i]));
    run_pass(pack_op, ops, cycles);
    checks++;
    if (cycles != NW + 1 || results.size() != NW) begin
      failures++;
      $display("%s pack: %0d results in %0d cycles, expected %0d in %0d", name, results.size(), cycles, NW, NW + 1);
    end
    packed_w = results;
    foreach (packed_w[i]) begin
      checks++;
      if (packed_w[i] != ref_fp32_to_posit(weights[i], n, es)) failures++;
    end
    run_pass(unpack_op, packed_w, cycles);
    checks++;
    if (cycles != NW + 1 || results.size() != NW) begin
      failures++;
      $display("%s unpack: %0d results in %0d cycles", name, results.size(), cycles);
    end
    foreach (results[i]) begin
      checks++;
      if (results[i] != {32'b0, ref_posit_to_fp32(packed_w[i], n, es)}) failures++;
      w = real_of_fp32(weights[i]);
      u = real_of_fp32(results[i][31:0]);
      if ((w >= 0.015625 || w <= -0.015625) && ((w - u) / w) > max_rel) max_rel = (w - u) / w;
    end
    size = OVERHEAD + NW * bytes_per_weight;
    $display("%-12s %0d bytes, compression %0.2f, max relative error %0.5f, %0d cycles per pass",
             name, size, 224894.0 / real'(size), max_rel, cycles);
    checks++;
    if (bytes_per_weight == 2 && size != 112874) failures++;
    if (bytes_per_weight == 1 && size != 56864)  failures++;
  endtask

  initial begin
    real g;
    for (int i = 0; i < NW; i++) begin
      // Sum of four uniforms in [-0.5, 0.5): std 0.577; scaled to about 0.1.
      g = 0.0;
      for (int j = 0; j < 4; j++) g += (real'($urandom_range(0, 65535)) / 65536.0 - 0.5);
      g = g * 0.173;
      weights[i] = (g == 0.0) ? 32'h0 : fp32_of_real(real'($rtoi(g * 8388608.0)) / 8388608.0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (OVERHEAD + NW * 4 != 224894) failures++;
    run_format("posit(8,0)",  OP_P8_S,   OP_S_P8,   8,  0, 1);
    run_format("posit(16,0)", OP_P160_S, OP_S_P160, 16, 0, 2);
    run_format("posit(16,1)", OP_P161_S, OP_S_P161, 16, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
