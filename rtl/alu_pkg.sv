// alu_pkg: instruction encoding shared by the gated ALU and its units.
//
// The ALU executes eleven instructions, split between an arithmetic unit
// (four operations) and a logic unit (seven operations). The count of
// eleven is the published one; which eleven, and their 4-bit encoding, are
// this design's choice. Codes 11 to 15 are not instructions.
package alu_pkg;

  // Instruction select presented at the ALU's select lines.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,   // A + B
    OP_SUB  = 4'd1,   // A - B
    OP_INC  = 4'd2,   // A + 1
    OP_DEC  = 4'd3,   // A - 1
    OP_AND  = 4'd4,   // A & B
    OP_OR   = 4'd5,   // A | B
    OP_XOR  = 4'd6,   // A ^ B
    OP_NAND = 4'd7,   // ~(A & B)
    OP_NOR  = 4'd8,   // ~(A | B)
    OP_XNOR = 4'd9,   // ~(A ^ B)
    OP_NOT  = 4'd10   // ~A
  } opcode_e;

  localparam int unsigned NUM_INSTR = 11;

  // Operation field of the arithmetic unit.
  typedef enum logic [1:0] {
    AR_ADD = 2'd0,
    AR_SUB = 2'd1,
    AR_INC = 2'd2,
    AR_DEC = 2'd3
  } arith_op_e;

  // Operation field of the logic unit.
  typedef enum logic [2:0] {
    LG_AND  = 3'd0,
    LG_OR   = 3'd1,
    LG_XOR  = 3'd2,
    LG_NAND = 3'd3,
    LG_NOR  = 3'd4,
    LG_XNOR = 3'd5,
    LG_NOT  = 3'd6
  } logic_op_e;

  // Which unit drives the ALU output.
  typedef enum logic [1:0] {
    UNIT_NONE  = 2'd0,
    UNIT_ARITH = 2'd1,
    UNIT_LOGIC = 2'd2
  } unit_e;

  // Split of an instruction into a unit and that unit's operation field.
  typedef struct packed {
    unit_e     unit;
    arith_op_e arith_op;
    logic_op_e logic_op;
  } decoded_t;

  function automatic decoded_t decode(logic [3:0] opcode);
    decoded_t d;
    d.unit     = UNIT_NONE;
    d.arith_op = AR_ADD;
    d.logic_op = LG_AND;
    if (opcode <= 4'd3) begin
      d.unit     = UNIT_ARITH;
      d.arith_op = arith_op_e'(opcode[1:0]);
    end else if (32'(opcode) < NUM_INSTR) begin
      d.unit     = UNIT_LOGIC;
      d.logic_op = logic_op_e'(3'(opcode - 4'd4));
    end
    return d;
  endfunction

endpackage
