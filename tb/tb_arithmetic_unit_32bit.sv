// tb_arithmetic_unit_32bit: self-checking test of add, subtract, increment
// and decrement. Result, carry (carry out of the adder, i.e. "no borrow" for
// subtract and decrement) and signed overflow are compared with reference
// values from the simulator's arithmetic, over corner and random operands.
module tb_arithmetic_unit_32bit;
  import alu_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] a, b, r;
  arith_op_e   op;
  logic        c, v;

  arithmetic_unit_32bit dut (.a(a), .b(b), .op(op), .result(r), .carry(c), .ovf(v));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input arith_op_e o);
    logic [32:0] full;
    logic [31:0] y_eff;
    logic        ref_v;
    a = x; b = y; op = o;
    #1;
    unique case (o)
      ARITH_ADD: begin full = {1'b0, x} + {1'b0, y};            y_eff = y;          end
      ARITH_SUB: begin full = {1'b0, x} + {1'b0, ~y} + 33'd1;   y_eff = ~y;         end
      ARITH_INC: begin full = {1'b0, x} + 33'd1;                y_eff = 32'd0;      end
      default:   begin full = {1'b0, x} + 33'h0_FFFF_FFFF;      y_eff = 32'hFFFF_FFFF; end
    endcase
    // signed overflow of the true operation
    unique case (o)
      ARITH_ADD: ref_v = (x[31] == y[31]) && (full[31] != x[31]);
      ARITH_SUB: ref_v = (x[31] != y[31]) && (full[31] != x[31]);
      ARITH_INC: ref_v = (x == 32'h7FFF_FFFF);
      default:   ref_v = (x == 32'h8000_0000);
    endcase
    checks++;
    if (r !== full[31:0] || c !== full[32] || v !== ref_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL op %s %h,%h: got %h c%0d v%0d want %h c%0d v%0d (beff %h)",
                 o.name(), x, y, r, c, v, full[31:0], full[32], ref_v, y_eff);
    end
  endtask

  initial begin
    automatic arith_op_e ops [4] = '{ARITH_ADD, ARITH_SUB, ARITH_INC, ARITH_DEC};
    automatic logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    a = '0; b = '0; op = ARITH_ADD;
    foreach (ops[k])
      foreach (corner[i])
        foreach (corner[j]) check(corner[i], corner[j], ops[k]);
    // spot values worked by hand
    a = 32'd100; b = 32'd58; op = ARITH_SUB; #1; checks++;
    if (r !== 32'd42 || c !== 1'b1) failures++;
    a = 32'd0; op = ARITH_DEC; #1; checks++;
    if (r !== 32'hFFFF_FFFF || c !== 1'b0) failures++;
    for (int i = 0; i < 20000; i++) check($urandom, $urandom, ops[$urandom % 4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
