// alu_pkg: shared types of the 32-bit ALU.
//
// Holds the data width, the 4-bit operation code seen at the ALU boundary,
// the unit-select code the decoder hands to the output multiplexer, and the
// sub-operation codes of the arithmetic, logic and shift units. The set of
// operations (add, subtract, increment, decrement, AND, OR, XOR, NAND, NOR,
// NOT, signed multiply) follows the described ALU; the shift operations come
// from the barrel shifter in its module hierarchy. All numeric encodings
// below are this design's own choice.
package alu_pkg;

  parameter int unsigned ALU_WIDTH = 32;

  // Operation code at the ALU boundary.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_INC  = 4'd2,
    OP_DEC  = 4'd3,
    OP_AND  = 4'd4,
    OP_OR   = 4'd5,
    OP_XOR  = 4'd6,
    OP_NAND = 4'd7,
    OP_NOR  = 4'd8,
    OP_NOT  = 4'd9,
    OP_MUL  = 4'd10,
    OP_SLL  = 4'd11,
    OP_SRL  = 4'd12,
    OP_SRA  = 4'd13,
    OP_RSV0 = 4'd14,
    OP_RSV1 = 4'd15
  } alu_op_e;

  // Which unit drives the ALU result.
  typedef enum logic [2:0] {
    UNIT_NONE  = 3'd0,
    UNIT_ARITH = 3'd1,
    UNIT_LOGIC = 3'd2,
    UNIT_MUL   = 3'd3,
    UNIT_SHIFT = 3'd4
  } unit_sel_e;

  typedef enum logic [1:0] {
    ARITH_ADD = 2'd0,
    ARITH_SUB = 2'd1,
    ARITH_INC = 2'd2,
    ARITH_DEC = 2'd3
  } arith_op_e;

  typedef enum logic [2:0] {
    LOGIC_AND  = 3'd0,
    LOGIC_OR   = 3'd1,
    LOGIC_XOR  = 3'd2,
    LOGIC_NAND = 3'd3,
    LOGIC_NOR  = 3'd4,
    LOGIC_NOT  = 3'd5
  } logic_op_e;

  typedef enum logic [1:0] {
    SHIFT_SLL = 2'd0,
    SHIFT_SRL = 2'd1,
    SHIFT_SRA = 2'd2
  } shift_op_e;

  // Control word produced by the operation decoder.
  typedef struct packed {
    unit_sel_e unit;
    arith_op_e arith_op;
    logic_op_e logic_op;
    shift_op_e shift_op;
  } alu_ctrl_t;

endpackage
