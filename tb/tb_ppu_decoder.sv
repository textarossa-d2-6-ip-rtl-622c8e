// tb_ppu_decoder -- checks the decoding of the 18 conversion instructions.
//
// Each instruction is assembled from its field values with random register
// indices and must decode to its operation, with rd and rs1 passed through.
// Then every word differing from a valid one in the major opcode, in one
// funct7 bit, or in the rs2 field, and 20000 random custom-0 words, must
// decode to the operation of the table (if any) or be flagged illegal.
module tb_ppu_decoder;
  import ppu_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] instr;
  logic        legal;
  ppu_op_e     op;
  logic [4:0]  rd, rs1;

  ppu_decoder dut (.instr(instr), .legal(legal), .op(op), .rd(rd), .rs1(rs1));

  typedef struct {
    logic [6:0] f7;
    logic [4:0] rs2;
    logic [2:0] f3;
    ppu_op_e    op;
  } row_t;

  row_t table_rows[18] = '{
    '{7'b1100000, 5'b00010, 3'b000, OP_S_P8},
    '{7'b1100000, 5'b00011, 3'b000, OP_S_P160},
    '{7'b1100000, 5'b00011, 3'b010, OP_S_P161},
    '{7'b1101000, 5'b00010, 3'b000, OP_P8_S},
    '{7'b1101000, 5'b00011, 3'b000, OP_P160_S},
    '{7'b1101000, 5'b00011, 3'b010, OP_P161_S},
    '{7'b1100000, 5'b00010, 3'b001, OP_H_P8},
    '{7'b1100000, 5'b00011, 3'b001, OP_W_P160},
    '{7'b1100000, 5'b00011, 3'b011, OP_L_P161},
    '{7'b1101000, 5'b00010, 3'b001, OP_P8_H},
    '{7'b1101000, 5'b00011, 3'b001, OP_P160_W},
    '{7'b1101000, 5'b00011, 3'b011, OP_P161_L},
    '{7'b1100000, 5'b00010, 3'b100, OP_P8_P160},
    '{7'b1100000, 5'b00011, 3'b100, OP_P160_P8},
    '{7'b1101000, 5'b00011, 3'b111, OP_P161_P160},
    '{7'b1101000, 5'b00010, 3'b101, OP_P161_P8},
    '{7'b1100000, 5'b00011, 3'b110, OP_P8_P161},
    '{7'b1101000, 5'b00011, 3'b101, OP_P160_P161}
  };

  function automatic ppu_op_e lookup(logic [31:0] w);
    if (w[6:0] != 7'b0001011) return OP_NONE;
    foreach (table_rows[i])
      if (w[31:25] == table_rows[i].f7 && w[24:20] == table_rows[i].rs2 &&
          w[14:12] == table_rows[i].f3)
        return table_rows[i].op;
    return OP_NONE;
  endfunction

  task automatic check(logic [31:0] w);
    ppu_op_e e = lookup(w);
    instr = w;
    #1;
    checks++;
    if (op != e || legal != (e != OP_NONE) || rd != w[11:7] || rs1 != w[19:15]) begin
      failures++;
      if (failures < 20) $display("instr %h: op %0d legal %b, expected %0d", w, op, legal, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    foreach (table_rows[i]) begin
      w = {table_rows[i].f7, table_rows[i].rs2, 5'($urandom), table_rows[i].f3,
           5'($urandom), 7'b0001011};
      check(w);
      // The table row itself must give a distinct, non-empty operation.
      checks++;
      if (op != table_rows[i].op || op == OP_NONE) failures++;
      check(w ^ 32'h0000_0001);                 // wrong major opcode
      check(w ^ 32'h0000_0020);                 // custom-1 opcode
      for (int b = 25; b < 32; b++) check(w ^ (32'h1 << b));
      for (int r = 0; r < 32; r++) check({w[31:25], 5'(r), w[19:0]});
      for (int f = 0; f < 8; f++) check({w[31:15], 3'(f), w[11:0]});
    end
    for (int i = 0; i < 20000; i++) begin
      w = $urandom;
      w[6:0] = 7'b0001011;
      if (i % 2 == 0) w[31:25] = ($urandom_range(0, 1) != 0) ? 7'b1100000 : 7'b1101000;
      if (i % 4 == 0) w[24:21] = 4'b0001;
      check(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
