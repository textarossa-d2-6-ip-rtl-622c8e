// ppu_decoder -- instruction decoder for the light PPU conversion instructions.
//
// The conversions are R-type instructions in the RISC-V custom-0 major opcode
// (0x0b). funct7 is 1100000 or 1101000, the rs2 field selects the posit width
// (00010 for 8 bits, 00011 for 16 bits) and funct3 the kind of conversion, as
// listed in the published instruction table:
//
//   funct7  rs2    funct3  instruction        funct7  rs2    funct3  instruction
//   1100000 00010  000     FCVT.S.P8          1101000 00010  000     FCVT.P8.S
//   1100000 00011  000     FCVT.S.P16.0       1101000 00011  000     FCVT.P16.0.S
//   1100000 00011  010     FCVT.S.P16.1       1101000 00011  010     FCVT.P16.1.S
//   1100000 00010  001     FXCVT.H.P8         1101000 00010  001     FXCVT.P8.H
//   1100000 00011  001     FXCVT.W.P16.0      1101000 00011  001     FXCVT.P16.0.W
//   1100000 00011  011     FXCVT.L.P16.1      1101000 00011  011     FXCVT.P16.1.L
//   1100000 00010  100     FCVT.P8.P16.0      1101000 00011  111     FCVT.P16.1.P16.0
//   1100000 00011  100     FCVT.P16.0.P8      1101000 00010  101     FCVT.P16.1.P8
//   1100000 00011  110     FCVT.P8.P16.1      1101000 00011  101     FCVT.P16.0.P16.1
//
// Names read destination first (FCVT.S.P8 turns a posit8 into a binary32).
// Any other word is flagged illegal and decodes to OP_NONE.
//
// Purely combinational.
//   instr : 32-bit instruction word
//   legal : instr is one of the 18 conversions
//   op    : decoded operation
//   rd    : destination register index
//   rs1   : source register index
module ppu_decoder (
  input  logic [31:0]      instr,
  output logic             legal,
  output ppu_pkg::ppu_op_e op,
  output logic [4:0]       rd,
  output logic [4:0]       rs1
);
  import ppu_pkg::*;

  logic [6:0] opcode;
  logic [6:0] funct7;
  logic [4:0] rs2;
  logic [2:0] funct3;

  assign opcode = instr[6:0];
  assign rd     = instr[11:7];
  assign funct3 = instr[14:12];
  assign rs1    = instr[19:15];
  assign rs2    = instr[24:20];
  assign funct7 = instr[31:25];

  always_comb begin
    op = OP_NONE;
    if (opcode == OPC_CUSTOM0) begin
      unique case ({funct7, rs2, funct3})
        {F7_FROM_POS, RS2_P8,  3'b000}: op = OP_S_P8;
        {F7_FROM_POS, RS2_P16, 3'b000}: op = OP_S_P160;
        {F7_FROM_POS, RS2_P16, 3'b010}: op = OP_S_P161;
        {F7_TO_POS,   RS2_P8,  3'b000}: op = OP_P8_S;
        {F7_TO_POS,   RS2_P16, 3'b000}: op = OP_P160_S;
        {F7_TO_POS,   RS2_P16, 3'b010}: op = OP_P161_S;
        {F7_FROM_POS, RS2_P8,  3'b001}: op = OP_H_P8;
        {F7_FROM_POS, RS2_P16, 3'b001}: op = OP_W_P160;
        {F7_FROM_POS, RS2_P16, 3'b011}: op = OP_L_P161;
        {F7_TO_POS,   RS2_P8,  3'b001}: op = OP_P8_H;
        {F7_TO_POS,   RS2_P16, 3'b001}: op = OP_P160_W;
        {F7_TO_POS,   RS2_P16, 3'b011}: op = OP_P161_L;
        {F7_FROM_POS, RS2_P8,  3'b100}: op = OP_P8_P160;
        {F7_FROM_POS, RS2_P16, 3'b100}: op = OP_P160_P8;
        {F7_TO_POS,   RS2_P16, 3'b111}: op = OP_P161_P160;
        {F7_TO_POS,   RS2_P8,  3'b101}: op = OP_P161_P8;
        {F7_FROM_POS, RS2_P16, 3'b110}: op = OP_P8_P161;
        {F7_TO_POS,   RS2_P16, 3'b101}: op = OP_P160_P161;
        default:                        op = OP_NONE;
      endcase
    end
    legal = (op != OP_NONE);
  end
endmodule
