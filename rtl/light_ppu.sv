// light_ppu -- conversion bank of the light Posit Processing Unit.
//
// One converter per instruction, all fed from the same source operand, and an
// opcode-driven multiplexer that picks the result. The published overall
// architecture shows the six binary32 converters (posit8, posit16,0 and
// posit16,1, each way); the instruction table adds six posit/fixed-point and
// six posit/posit conversions, which are built here the same way.
//
// Operand and result use the 64-bit register width of the host core; each
// converter reads the low bits it needs. Posit and binary32 results are
// zero-extended, fixed-point results sign-extended (this design's choice).
// Fixed-point layouts: Q8.8 halfword for posit8, Q16.16 word for posit16,0,
// Q32.32 long for posit16,1.
//
// Purely combinational; the whole bank settles in one clock cycle.
//   op  : operation from ppu_decoder
//   src : source operand (rs1)
//   res : result for rd
module light_ppu (
  input  ppu_pkg::ppu_op_e               op,
  input  logic [ppu_pkg::XLEN-1:0]       src,
  output logic [ppu_pkg::XLEN-1:0]       res
);
  import ppu_pkg::*;

  // binary32 <-> posit
  logic [7:0]  p8_s;
  logic [15:0] p160_s, p161_s;
  logic [31:0] s_p8, s_p160, s_p161;
  // fixed <-> posit
  logic [15:0] h_p8;
  logic [31:0] w_p160;
  logic [63:0] l_p161;
  logic [7:0]  p8_h;
  logic [15:0] p160_w, p161_l;
  // posit <-> posit
  logic [7:0]  p8_p160, p8_p161;
  logic [15:0] p160_p8, p161_p160, p161_p8, p160_p161;

  fp32_to_posit #(.N(8),  .ES(0)) u_p8_s   (.fp(src[31:0]), .posit(p8_s));
  fp32_to_posit #(.N(16), .ES(0)) u_p160_s (.fp(src[31:0]), .posit(p160_s));
  fp32_to_posit #(.N(16), .ES(1)) u_p161_s (.fp(src[31:0]), .posit(p161_s));

  posit_to_fp32 #(.N(8),  .ES(0)) u_s_p8   (.posit(src[7:0]),  .fp(s_p8));
  posit_to_fp32 #(.N(16), .ES(0)) u_s_p160 (.posit(src[15:0]), .fp(s_p160));
  posit_to_fp32 #(.N(16), .ES(1)) u_s_p161 (.posit(src[15:0]), .fp(s_p161));

  posit_to_fixed #(.N(8),  .ES(0)) u_h_p8   (.posit(src[7:0]),  .fixed(h_p8));
  posit_to_fixed #(.N(16), .ES(0)) u_w_p160 (.posit(src[15:0]), .fixed(w_p160));
  posit_to_fixed #(.N(16), .ES(1)) u_l_p161 (.posit(src[15:0]), .fixed(l_p161));

  fixed_to_posit #(.N(8),  .ES(0)) u_p8_h   (.fixed(src[15:0]), .posit(p8_h));
  fixed_to_posit #(.N(16), .ES(0)) u_p160_w (.fixed(src[31:0]), .posit(p160_w));
  fixed_to_posit #(.N(16), .ES(1)) u_p161_l (.fixed(src[63:0]), .posit(p161_l));

  posit_to_posit #(.NI(16), .ESI(0), .NO(8),  .ESO(0)) u_p8_p160   (.src(src[15:0]), .dst(p8_p160));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(0)) u_p160_p8   (.src(src[7:0]),  .dst(p160_p8));
  posit_to_posit #(.NI(16), .ESI(0), .NO(16), .ESO(1)) u_p161_p160 (.src(src[15:0]), .dst(p161_p160));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(1)) u_p161_p8   (.src(src[7:0]),  .dst(p161_p8));
  posit_to_posit #(.NI(16), .ESI(1), .NO(8),  .ESO(0)) u_p8_p161   (.src(src[15:0]), .dst(p8_p161));
  posit_to_posit #(.NI(16), .ESI(1), .NO(16), .ESO(0)) u_p160_p161 (.src(src[15:0]), .dst(p160_p161));

  // Opcode multiplexer.
  always_comb begin
    unique case (op)
      OP_S_P8:      res = {32'b0, s_p8};
      OP_S_P160:    res = {32'b0, s_p160};
      OP_S_P161:    res = {32'b0, s_p161};
      OP_P8_S:      res = {56'b0, p8_s};
      OP_P160_S:    res = {48'b0, p160_s};
      OP_P161_S:    res = {48'b0, p161_s};
      OP_H_P8:      res = {{48{h_p8[15]}}, h_p8};
      OP_W_P160:    res = {{32{w_p160[31]}}, w_p160};
      OP_L_P161:    res = l_p161;
      OP_P8_H:      res = {56'b0, p8_h};
      OP_P160_W:    res = {48'b0, p160_w};
      OP_P161_L:    res = {48'b0, p161_l};
      OP_P8_P160:   res = {56'b0, p8_p160};
      OP_P160_P8:   res = {48'b0, p160_p8};
      OP_P161_P160: res = {48'b0, p161_p160};
      OP_P161_P8:   res = {48'b0, p161_p8};
      OP_P8_P161:   res = {56'b0, p8_p161};
      OP_P160_P161: res = {48'b0, p160_p161};
      default:      res = '0;
    endcase
  end
endmodule
