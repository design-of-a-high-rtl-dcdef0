// logic_unit_32bit: bitwise logic operations.
//
// Computes AND, OR, XOR, NAND, NOR of a and b, or NOT of a, chosen by a
// sub-operation code from the operation decoder. Codes outside the list
// give zero. Combinational. The operation set follows the described logic
// unit (NOT is among the ALU's logic operations); the encoding is this
// design's own.
module logic_unit_32bit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic_op_e        op,
  output logic [WIDTH-1:0] result
);

  always_comb begin
    unique case (op)
      LOGIC_AND:  result = a & b;
      LOGIC_OR:   result = a | b;
      LOGIC_XOR:  result = a ^ b;
      LOGIC_NAND: result = ~(a & b);
      LOGIC_NOR:  result = ~(a | b);
      LOGIC_NOT:  result = ~a;
      default:    result = '0;
    endcase
  end

endmodule
