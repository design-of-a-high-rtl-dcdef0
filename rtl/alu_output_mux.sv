// alu_output_mux: output selection multiplexer (second half of the control
// unit).
//
// Picks the result of the unit named by the decoder. result is the low
// WIDTH bits; result_hi carries the upper half of the 2*WIDTH-bit product
// for a multiply and is zero otherwise. carry and overflow pass through from
// the arithmetic unit for arithmetic operations and are zero otherwise. An
// unused operation code gives all zeros. Combinational. The multiplexer
// itself follows the described control unit; the output format (upper
// product half, flags) is this design's choice.
module alu_output_mux
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  unit_sel_e          unit,
  input  logic [WIDTH-1:0]   arith_result,
  input  logic               arith_carry,
  input  logic               arith_ovf,
  input  logic [WIDTH-1:0]   logic_result,
  input  logic [WIDTH-1:0]   shift_result,
  input  logic [2*WIDTH-1:0] mul_product,
  output logic [WIDTH-1:0]   result,
  output logic [WIDTH-1:0]   result_hi,
  output logic               carry,
  output logic               overflow
);

  always_comb begin
    result    = '0;
    result_hi = '0;
    carry     = 1'b0;
    overflow  = 1'b0;
    unique case (unit)
      UNIT_ARITH: begin
        result   = arith_result;
        carry    = arith_carry;
        overflow = arith_ovf;
      end
      UNIT_LOGIC: result = logic_result;
      UNIT_SHIFT: result = shift_result;
      UNIT_MUL:   {result_hi, result} = mul_product;
      default:    ;
    endcase
  end

endmodule
