// ppu_pkg -- shared types and constants of the light Posit Processing Unit.
//
// The light PPU is a conversion-only posit co-processor for a 64-bit RISC-V
// core: it packs IEEE binary32 values and fixed-point integers into 8- and
// 16-bit posits (and back), so that data can be stored compressed while the
// arithmetic stays in the FPU or ALU. This package holds the instruction
// encoding of the custom-0 conversion instructions, the operation code that
// the decoder hands to the conversion bank, and the width of the signed
// exponent used between the unpack and pack halves of every converter.
//
// The instruction fields (funct7, rs2 selector, funct3, custom-0 major
// opcode) follow the published instruction table; the enum values and the
// exponent width are this design's own choices.
package ppu_pkg;

  // Register width of the host core (64-bit RISC-V).
  localparam int unsigned XLEN = 64;

  // Signed exponent width carried between unpack and pack stages. Covers the
  // binary32 range (-126..127) and the 64-bit fixed-point range (-32..31).
  localparam int unsigned EW = 10;

  // Instruction encoding (R-type layout in the custom-0 major opcode).
  localparam logic [6:0] OPC_CUSTOM0  = 7'b0001011;  // 0x0b
  localparam logic [6:0] F7_FROM_POS  = 7'b1100000;  // posit source (and P16.0<-P8, P8<-P16.x)
  localparam logic [6:0] F7_TO_POS    = 7'b1101000;  // posit destination
  localparam logic [4:0] RS2_P8       = 5'b00010;
  localparam logic [4:0] RS2_P16      = 5'b00011;

  // Operation selected by the decoder. Names follow dest.src order.
  typedef enum logic [4:0] {
    OP_NONE          = 5'd0,
    OP_S_P8          = 5'd1,   // FCVT.S.P8        posit8     -> binary32
    OP_S_P160        = 5'd2,   // FCVT.S.P16.0     posit16,0  -> binary32
    OP_S_P161        = 5'd3,   // FCVT.S.P16.1     posit16,1  -> binary32
    OP_P8_S          = 5'd4,   // FCVT.P8.S        binary32   -> posit8
    OP_P160_S        = 5'd5,   // FCVT.P16.0.S
    OP_P161_S        = 5'd6,   // FCVT.P16.1.S
    OP_H_P8          = 5'd7,   // FXCVT.H.P8       posit8     -> Q8.8
    OP_W_P160        = 5'd8,   // FXCVT.W.P16.0    posit16,0  -> Q16.16
    OP_L_P161        = 5'd9,   // FXCVT.L.P16.1    posit16,1  -> Q32.32
    OP_P8_H          = 5'd10,  // FXCVT.P8.H
    OP_P160_W        = 5'd11,  // FXCVT.P16.0.W
    OP_P161_L        = 5'd12,  // FXCVT.P16.1.L
    OP_P8_P160       = 5'd13,  // FCVT.P8.P16.0    posit16,0  -> posit8
    OP_P160_P8       = 5'd14,  // FCVT.P16.0.P8
    OP_P161_P160     = 5'd15,  // FCVT.P16.1.P16.0
    OP_P161_P8       = 5'd16,  // FCVT.P16.1.P8
    OP_P8_P161       = 5'd17,  // FCVT.P8.P16.1
    OP_P160_P161     = 5'd18   // FCVT.P16.0.P16.1
  } ppu_op_e;

  localparam int unsigned NUM_OPS = 19;

endpackage
