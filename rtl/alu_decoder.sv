// alu_decoder: ALU operation decoder (first half of the control unit).
//
// Turns the 4-bit operation code into a control word: which unit drives the
// result (arithmetic, logic, multiplier, shifter, or none for the two
// unused codes) and the sub-operation code for the arithmetic, logic and
// shift units. Fields not used by the selected unit are held at zero.
// Combinational. That the control unit holds an operation decoder follows
// the described ALU; the control word layout is this design's own.
module alu_decoder
  import alu_pkg::*;
(
  input  alu_op_e   op,
  output alu_ctrl_t ctrl
);

  always_comb begin
    ctrl = '{unit: UNIT_NONE, arith_op: ARITH_ADD, logic_op: LOGIC_AND, shift_op: SHIFT_SLL};
    unique case (op)
      OP_ADD:  begin ctrl.unit = UNIT_ARITH; ctrl.arith_op = ARITH_ADD;  end
      OP_SUB:  begin ctrl.unit = UNIT_ARITH; ctrl.arith_op = ARITH_SUB;  end
      OP_INC:  begin ctrl.unit = UNIT_ARITH; ctrl.arith_op = ARITH_INC;  end
      OP_DEC:  begin ctrl.unit = UNIT_ARITH; ctrl.arith_op = ARITH_DEC;  end
      OP_AND:  begin ctrl.unit = UNIT_LOGIC; ctrl.logic_op = LOGIC_AND;  end
      OP_OR:   begin ctrl.unit = UNIT_LOGIC; ctrl.logic_op = LOGIC_OR;   end
      OP_XOR:  begin ctrl.unit = UNIT_LOGIC; ctrl.logic_op = LOGIC_XOR;  end
      OP_NAND: begin ctrl.unit = UNIT_LOGIC; ctrl.logic_op = LOGIC_NAND; end
      OP_NOR:  begin ctrl.unit = UNIT_LOGIC; ctrl.logic_op = LOGIC_NOR;  end
      OP_NOT:  begin ctrl.unit = UNIT_LOGIC; ctrl.logic_op = LOGIC_NOT;  end
      OP_MUL:  begin ctrl.unit = UNIT_MUL;                               end
      OP_SLL:  begin ctrl.unit = UNIT_SHIFT; ctrl.shift_op = SHIFT_SLL;  end
      OP_SRL:  begin ctrl.unit = UNIT_SHIFT; ctrl.shift_op = SHIFT_SRL;  end
      OP_SRA:  begin ctrl.unit = UNIT_SHIFT; ctrl.shift_op = SHIFT_SRA;  end
      default: begin ctrl.unit = UNIT_NONE;                              end
    endcase
  end

endmodule
