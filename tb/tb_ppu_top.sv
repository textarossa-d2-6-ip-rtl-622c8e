// tb_ppu_top -- end-to-end test of the light PPU execution unit.
//
// A stream of instruction words (all 18 conversions with operands suited to
// each, plus illegal words) is issued with random gaps while the consumer
// applies random backpressure. A scoreboard holds the expected rd index,
// result and illegal flag of every accepted instruction, in order. It checks:
//   - every result against the reference model;
//   - the latency: with out_ready high, a result appears the cycle after its
//     instruction was accepted;
//   - that a stalled result is held.
// It counts how often each mechanism occurred (each operation, an illegal
// word, an input stall from backpressure, a NaR result, a saturated result,
// a zero result) and counts a failure for any that never did.
module tb_ppu_top;
  import ppu_pkg::*;
  import posit_ref_pkg::*;

  localparam int NUM_INSTR = 20000;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  logic [31:0] in_instr = '0;
  logic [63:0] in_rs1 = '0;
  logic        out_valid;
  logic        out_ready = 1'b0;
  logic [4:0]  out_rd;
  logic [63:0] out_data;
  logic        out_illegal;

  ppu_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [4:0]  rd;
    logic [63:0] data;
    logic        illegal;
    ppu_op_e     op;
  } exp_t;

  exp_t exp_q[$];
  int   op_count[NUM_OPS];
  int   illegal_count = 0, stall_count = 0, nar_count = 0, sat_count = 0, zero_count = 0;
  int   accepted = 0, retired = 0, latency_checks = 0;
  logic accepted_last = 1'b0;
  logic held_valid = 1'b0;
  logic [63:0] held_data;

  // Watchdog.
  initial begin
    repeat (NUM_INSTR * 10 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Driver: changes inputs on the falling edge, random gaps, holds the word
  // while stalled. in_ready seen on a falling edge is the value the next
  // rising edge samples.
  initial begin
    ppu_op_e     o;
    logic [63:0] a;
    logic [4:0]  rd;
    logic        taken;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NUM_INSTR; i++) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      rd = 5'($urandom);
      if (i % 50 == 7) begin
        // Illegal word: custom-0 with an unused funct7.
        o = OP_NONE;
        a = {$urandom, $urandom};
        in_instr = {7'b0000001, 5'($urandom), 5'($urandom), 3'($urandom), rd, 7'b0001011};
      end else begin
        o = ppu_op_e'(1 + (i % (NUM_OPS - 1)));
        a = gen_operand(o);
        if (i % 97 == 3) a = 64'h8000_0000_0000_8080;   // NaR for posit sources
        in_instr = encode_ppu(o, rd, 5'($urandom));
      end
      in_rs1   = a;
      in_valid = 1'b1;
      exp_q.push_back('{rd: rd, data: ref_ppu(o, a), illegal: (o == OP_NONE), op: o});
      do begin
        taken = in_ready;
        @(negedge clk);
        if (!taken) stall_count++;
      end while (!taken);
      in_valid = 1'b0;
    end
  end

  // Consumer: random backpressure.
  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  // Monitor.
  always @(posedge clk) begin
    if (rst_n) begin
      // Held result must not change.
      if (held_valid) begin
        checks++;
        if (!out_valid || out_data !== held_data) begin
          failures++;
          $display("held result changed");
        end
      end
      // One-cycle latency: an instruction accepted last cycle is visible now.
      if (accepted_last) begin
        latency_checks++;
        checks++;
        if (!out_valid) begin
          failures++;
          $display("result not valid one cycle after acceptance");
        end
      end
      held_valid    <= out_valid && !out_ready;
      held_data     <= out_data;
      accepted_last <= in_valid && in_ready;
      if (in_valid && in_ready) accepted++;

      if (out_valid && out_ready) begin
        exp_t e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected result");
        end else begin
          e = exp_q.pop_front();
          if (out_rd !== e.rd || out_data !== e.data || out_illegal !== e.illegal) begin
            failures++;
            if (failures < 20)
              $display("op %0d: rd %0d data %h illegal %b, expected rd %0d data %h illegal %b",
                       e.op, out_rd, out_data, out_illegal, e.rd, e.data, e.illegal);
          end
          if (e.illegal) illegal_count++;
          else begin
            op_count[e.op]++;
            if (e.data == 64'h7FC0_0000 || e.data == 64'h80 || e.data == 64'h8000 ||
                e.data == 64'hFFFF_FFFF_FFFF_8000 || e.data == 64'h8000_0000_0000_0000 ||
                e.data == 64'hFFFF_FFFF_8000_0000)
              nar_count++;
            if (e.data == 64'h7F || e.data == 64'h81 || e.data == 64'h7FFF || e.data == 64'h8001 ||
                e.data == 64'h1  || e.data == 64'hFF || e.data == 64'hFFFF)
              sat_count++;
            if (e.data == 64'h0) zero_count++;
          end
        end
        retired++;
        if (retired == NUM_INSTR) begin
          check_coverage();
          $display("accepted %0d retired %0d, stalls %0d, illegal %0d, NaR %0d, saturated %0d, zero %0d, latency checks %0d",
                   accepted, retired, stall_count, illegal_count, nar_count, sat_count, zero_count, latency_checks);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  task automatic check_coverage();
    for (int o = 1; o < NUM_OPS; o++) begin
      checks++;
      if (op_count[o] == 0) begin
        failures++;
        $display("operation %0d never executed", o);
      end
    end
    checks += 5;
    if (illegal_count == 0) begin failures++; $display("no illegal word seen"); end
    if (stall_count == 0)   begin failures++; $display("no stall seen"); end
    if (nar_count == 0)     begin failures++; $display("no NaR result seen"); end
    if (sat_count == 0)     begin failures++; $display("no saturated result seen"); end
    if (zero_count == 0)    begin failures++; $display("no zero result seen"); end
  endtask
endmodule
