// alu_top_32: combinational 32-bit ALU.
//
// One operation per evaluation, selected by op (see alu_pkg::alu_op_e):
// add, subtract, increment, decrement (arithmetic unit on a Han-Carlson
// prefix adder), AND/OR/XOR/NAND/NOR/NOT (logic unit), signed multiply
// (radix-4 Booth encoder, Dadda tree, Han-Carlson final adder) and logical
// left/right and arithmetic right shift (barrel shifter, amount b[4:0]).
// The control unit is the operation decoder plus the output multiplexer.
// All units see the operands at once and the multiplexer keeps the one the
// decoder names, so there is no clock and no latency: outputs settle after
// the slowest path, the multiplier's.
//
// Ports: a, b operands; result low word; result_hi upper product word for a
// multiply (zero otherwise); carry/overflow from the arithmetic unit (zero
// for other operations). The unit set and the adder and multiplier
// structures follow the described ALU; the opcode map, the flag outputs and
// the shift amount source are this design's own.
module alu_top_32
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output logic [WIDTH-1:0] result_hi,
  output logic             carry,
  output logic             overflow
);

  alu_ctrl_t          ctrl;
  logic [WIDTH-1:0]   arith_result, logic_result, shift_result;
  logic               arith_carry, arith_ovf;
  logic [2*WIDTH-1:0] mul_product;

  alu_decoder u_decoder (
    .op   (op),
    .ctrl (ctrl)
  );

  arithmetic_unit_32bit #(.WIDTH(WIDTH)) u_arith (
    .a      (a),
    .b      (b),
    .op     (ctrl.arith_op),
    .result (arith_result),
    .carry  (arith_carry),
    .ovf    (arith_ovf)
  );

  booth_multiplier_32bit #(.WIDTH(WIDTH)) u_mul (
    .a       (a),
    .b       (b),
    .product (mul_product)
  );

  logic_unit_32bit #(.WIDTH(WIDTH)) u_logic (
    .a      (a),
    .b      (b),
    .op     (ctrl.logic_op),
    .result (logic_result)
  );

  barrel_shifter_32bit #(.WIDTH(WIDTH)) u_shift (
    .a      (a),
    .shamt  (b[$clog2(WIDTH)-1:0]),
    .op     (ctrl.shift_op),
    .result (shift_result)
  );

  alu_output_mux #(.WIDTH(WIDTH)) u_outmux (
    .unit         (ctrl.unit),
    .arith_result (arith_result),
    .arith_carry  (arith_carry),
    .arith_ovf    (arith_ovf),
    .logic_result (logic_result),
    .shift_result (shift_result),
    .mul_product  (mul_product),
    .result       (result),
    .result_hi    (result_hi),
    .carry        (carry),
    .overflow     (overflow)
  );

endmodule
