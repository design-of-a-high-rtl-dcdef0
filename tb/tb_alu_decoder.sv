// tb_alu_decoder: self-checking test of the operation decoder. All sixteen
// operation codes are applied and the control word is compared with an
// expected table written out here.
module tb_alu_decoder;
  import alu_pkg::*;

  logic      clk = 1'b0;
  int        checks = 0, failures = 0;
  alu_op_e   op;
  alu_ctrl_t ctrl;

  alu_decoder dut (.op(op), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {unit, arith_op, logic_op, shift_op}, one entry per code 0..15
  alu_ctrl_t expected [16];

  initial begin
    expected[0]  = '{UNIT_ARITH, ARITH_ADD, LOGIC_AND,  SHIFT_SLL};
    expected[1]  = '{UNIT_ARITH, ARITH_SUB, LOGIC_AND,  SHIFT_SLL};
    expected[2]  = '{UNIT_ARITH, ARITH_INC, LOGIC_AND,  SHIFT_SLL};
    expected[3]  = '{UNIT_ARITH, ARITH_DEC, LOGIC_AND,  SHIFT_SLL};
    expected[4]  = '{UNIT_LOGIC, ARITH_ADD, LOGIC_AND,  SHIFT_SLL};
    expected[5]  = '{UNIT_LOGIC, ARITH_ADD, LOGIC_OR,   SHIFT_SLL};
    expected[6]  = '{UNIT_LOGIC, ARITH_ADD, LOGIC_XOR,  SHIFT_SLL};
    expected[7]  = '{UNIT_LOGIC, ARITH_ADD, LOGIC_NAND, SHIFT_SLL};
    expected[8]  = '{UNIT_LOGIC, ARITH_ADD, LOGIC_NOR,  SHIFT_SLL};
    expected[9]  = '{UNIT_LOGIC, ARITH_ADD, LOGIC_NOT,  SHIFT_SLL};
    expected[10] = '{UNIT_MUL,   ARITH_ADD, LOGIC_AND,  SHIFT_SLL};
    expected[11] = '{UNIT_SHIFT, ARITH_ADD, LOGIC_AND,  SHIFT_SLL};
    expected[12] = '{UNIT_SHIFT, ARITH_ADD, LOGIC_AND,  SHIFT_SRL};
    expected[13] = '{UNIT_SHIFT, ARITH_ADD, LOGIC_AND,  SHIFT_SRA};
    expected[14] = '{UNIT_NONE,  ARITH_ADD, LOGIC_AND,  SHIFT_SLL};
    expected[15] = '{UNIT_NONE,  ARITH_ADD, LOGIC_AND,  SHIFT_SLL};
    for (int rep = 0; rep < 4; rep++)
      for (int c = 0; c < 16; c++) begin
        op = alu_op_e'(c);
        #1;
        checks++;
        if (ctrl !== expected[c]) begin
          failures++;
          if (failures < 10) $display("FAIL code %0d: got %h want %h", c, ctrl, expected[c]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
