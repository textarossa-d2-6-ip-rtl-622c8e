// ppu_top -- light PPU execution unit for the execute stage of a RISC-V core.
//
// The unit sits beside the integer ALU (and, if present, the FPU) in the
// execute stage. An issued instruction word and its rs1 operand enter with a
// valid/ready handshake; the decoder picks the conversion, the combinational
// conversion bank computes it and the result is registered together with the
// destination register index, so a result leaves one clock cycle after it was
// accepted. The unit takes a new instruction every cycle as long as the
// consumer accepts results (in_ready = !out_valid || out_ready); when the
// consumer stalls, the result is held and the input is stalled. Words that are
// not one of the 18 conversions complete with out_illegal set and a zero
// result, so that the core can raise an illegal-instruction exception.
//
// The placement in the execute stage follows the published integration; the
// handshake, the single result register and the illegal flag are this
// design's choices (the published timing is a single combinational path that
// fits a 125 MHz cycle).
//
// Lint notes that rst_n is used both as an asynchronous reset and as a
// sampled signal: the sampled use is only the disable condition of the
// handshake assertion below, which is not logic.
//
//   clk, rst_n                    : clock, active-low asynchronous reset
//   in_valid, in_ready            : instruction handshake
//   in_instr, in_rs1              : instruction word and rs1 value
//   out_valid, out_ready          : result handshake
//   out_rd, out_data, out_illegal : destination index, result, illegal flag
module ppu_top (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [31:0]              in_instr,
  input  logic [ppu_pkg::XLEN-1:0] in_rs1,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [4:0]               out_rd,
  output logic [ppu_pkg::XLEN-1:0] out_data,
  output logic                     out_illegal
);
  import ppu_pkg::*;

  logic                legal;
  ppu_op_e             op;
  logic [4:0]          rd;
  logic [4:0]          rs1_idx;
  logic [XLEN-1:0]     res;

  ppu_decoder u_decoder (
    .instr (in_instr),
    .legal (legal),
    .op    (op),
    .rd    (rd),
    .rs1   (rs1_idx)
  );

  light_ppu u_ppu (
    .op  (op),
    .src (in_rs1),
    .res (res)
  );

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_rd      <= '0;
      out_data    <= '0;
      out_illegal <= 1'b0;
    end else if (in_ready) begin
      out_valid   <= in_valid;
      if (in_valid) begin
        out_rd      <= rd;
        out_data    <= res;
        out_illegal <= !legal;
      end
    end
  end

  // A held result must not change until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_rd));
endmodule
