// tb_alu_exhaustive_8bit: every operation on every operand pair, at 8 bits.
//
// The 32-bit ALU cannot be simulated over all 2^64 operand pairs, so this
// test builds the same RTL with WIDTH = 8 and applies all 16 operation
// codes to all 65,536 pairs of 8-bit operands (about a million cases).
// Result, upper product byte, carry and overflow are compared with a
// reference model written with the simulator's own operators. The shift
// amount is b[2:0] at this width.
module tb_alu_exhaustive_8bit;
  import alu_pkg::*;

  logic       clk = 1'b0;
  int         checks = 0, failures = 0;
  logic [7:0] a, b, r, rh;
  alu_op_e    op;
  logic       c, v;

  alu_top_32 #(.WIDTH(8)) dut (.a(a), .b(b), .op(op), .result(r), .result_hi(rh), .carry(c), .overflow(v));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0]  full;
    logic [15:0] prod;
    logic [7:0]  want, want_hi;
    logic        want_c, want_v;
    a = '0; b = '0; op = OP_ADD;
    for (int o = 0; o < 16; o++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          a = 8'(x); b = 8'(y); op = alu_op_e'(o);
          #1;
          want_hi = '0; want_c = 1'b0; want_v = 1'b0;
          unique case (op)
            OP_ADD: begin full = 9'(x) + 9'(y); want = full[7:0]; want_c = full[8];
                          want_v = (a[7] == b[7]) && (want[7] != a[7]); end
            OP_SUB: begin want = a - b; want_c = (x >= y);
                          want_v = (a[7] != b[7]) && (want[7] != a[7]); end
            OP_INC: begin want = a + 8'd1; want_c = (x == 255); want_v = (x == 127); end
            OP_DEC: begin want = a - 8'd1; want_c = (x != 0);   want_v = (x == 128); end
            OP_AND:  want = a & b;
            OP_OR:   want = a | b;
            OP_XOR:  want = a ^ b;
            OP_NAND: want = ~(a & b);
            OP_NOR:  want = ~(a | b);
            OP_NOT:  want = ~a;
            OP_MUL:  begin prod = 16'($signed(a)) * 16'($signed(b)); {want_hi, want} = prod; end
            OP_SLL:  want = a << b[2:0];
            OP_SRL:  want = a >> b[2:0];
            OP_SRA:  want = 8'($signed(a) >>> b[2:0]);
            default: want = '0;
          endcase
          checks++;
          if (r !== want || rh !== want_hi || c !== want_c || v !== want_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL %s %h,%h: got %h_%h c%0d v%0d want %h_%h c%0d v%0d",
                       op.name(), a, b, rh, r, c, v, want_hi, want, want_c, want_v);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
