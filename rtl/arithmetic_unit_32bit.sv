// arithmetic_unit_32bit: add, subtract, increment and decrement.
//
// All four operations run on one Han-Carlson adder; only the second operand
// and the carry in change:
//   ADD  a + b        (b,  cin 0)
//   SUB  a - b        (~b, cin 1)
//   INC  a + 1        (0,  cin 1)
//   DEC  a - 1        (all ones, cin 0)
// carry is the adder's carry out (for SUB and DEC it is 1 when no borrow
// occurred) and ovf is two's complement overflow. Combinational.
// The operation list follows the described arithmetic unit; the operand
// steering and the flag conventions are this design's own choice.
module arithmetic_unit_32bit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  arith_op_e        op,
  output logic [WIDTH-1:0] result,
  output logic             carry,
  output logic             ovf
);

  logic [WIDTH-1:0] b_eff;
  logic             cin;

  always_comb begin
    unique case (op)
      ARITH_ADD: begin b_eff = b;                  cin = 1'b0; end
      ARITH_SUB: begin b_eff = ~b;                 cin = 1'b1; end
      ARITH_INC: begin b_eff = '0;                 cin = 1'b1; end
      ARITH_DEC: begin b_eff = '1;                 cin = 1'b0; end
      default:   begin b_eff = b;                  cin = 1'b0; end
    endcase
  end

  han_carlson_adder #(.WIDTH(WIDTH)) u_adder (
    .a    (a),
    .b    (b_eff),
    .cin  (cin),
    .sum  (result),
    .cout (carry),
    .ovf  (ovf)
  );

endmodule
