// tb_logic_unit_32bit: self-checking test of the logic unit. Every
// sub-operation is checked on fixed patterns and random operands against a
// per-bit truth-table lookup, independent of the unit's vector operators.
module tb_logic_unit_32bit;
  import alu_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] a, b, r;
  logic_op_e   op;

  logic_unit_32bit dut (.a(a), .b(b), .op(op), .result(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // truth tables indexed by {a_bit, b_bit}
  function automatic logic [3:0] table_of(input logic_op_e o);
    unique case (o)
      LOGIC_AND:  return 4'b1000;
      LOGIC_OR:   return 4'b1110;
      LOGIC_XOR:  return 4'b0110;
      LOGIC_NAND: return 4'b0111;
      LOGIC_NOR:  return 4'b0001;
      default:    return 4'b0011;  // NOT a
    endcase
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic_op_e o);
    logic [31:0] want;
    logic [3:0]  t;
    a = x; b = y; op = o;
    #1;
    t = table_of(o);
    for (int i = 0; i < 32; i++) want[i] = t[{x[i], y[i]}];
    checks++;
    if (r !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h %h: got %h want %h", o.name(), x, y, r, want);
    end
  endtask

  initial begin
    automatic logic_op_e ops [6] = '{LOGIC_AND, LOGIC_OR, LOGIC_XOR, LOGIC_NAND, LOGIC_NOR, LOGIC_NOT};
    a = '0; b = '0; op = LOGIC_AND;
    foreach (ops[k]) check(32'hFF00_FF00, 32'hF0F0_F0F0, ops[k]);
    for (int i = 0; i < 5000; i++) check($urandom, $urandom, ops[$urandom % 6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
