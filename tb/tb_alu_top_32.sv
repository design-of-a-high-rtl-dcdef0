// tb_alu_top_32: end-to-end test of the 32-bit ALU at its default size.
//
// Every operation code is applied to corner and random operands, and all
// outputs (result, result_hi, carry, overflow) are compared with a
// reference model written with the simulator's own operators. The outputs
// must be valid in the same step as the inputs (the ALU has no clock). The
// test also counts how often each mechanism occurred: each operation, a
// carry out, a signed overflow, a borrow in subtraction, a negative
// product, a sign-filling arithmetic shift and a reserved code giving zero.
// A mechanism that never occurs counts as a failure.
module tb_alu_top_32;
  import alu_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] a, b, r, rh;
  alu_op_e     op;
  logic        c, v;

  alu_top_32 dut (.a(a), .b(b), .op(op), .result(r), .result_hi(rh), .carry(c), .overflow(v));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int op_count [16];
  int n_carry = 0, n_ovf = 0, n_borrow = 0, n_negprod = 0, n_signfill = 0;

  task automatic check(input logic [31:0] x, input logic [31:0] y, input alu_op_e o);
    logic [32:0] full;
    logic [63:0] prod;
    logic [31:0] want, want_hi;
    logic        want_c, want_v;
    a = x; b = y; op = o;
    #1;
    want_hi = '0; want_c = 1'b0; want_v = 1'b0; full = '0;
    case (o)
      OP_ADD: begin full = {1'b0, x} + {1'b0, y};
                    want_v = (x[31] == y[31]) && (full[31] != x[31]); end
      OP_SUB: begin full = {1'b0, x} - {1'b0, y};
                    full[32] = (x >= y);  // carry = no borrow
                    want_v = (x[31] != y[31]) && (full[31] != x[31]); end
      OP_INC: begin full = {1'b0, x} + 33'd1;  want_v = (x == 32'h7FFF_FFFF); end
      OP_DEC: begin full = {1'b0, x} - 33'd1;  full[32] = (x != 0);
                    want_v = (x == 32'h8000_0000); end
      default: ;
    endcase
    case (o)
      OP_ADD, OP_SUB, OP_INC, OP_DEC: begin want = full[31:0]; want_c = full[32]; end
      OP_AND:  want = x & y;
      OP_OR:   want = x | y;
      OP_XOR:  want = x ^ y;
      OP_NAND: want = ~(x & y);
      OP_NOR:  want = ~(x | y);
      OP_NOT:  want = ~x;
      OP_MUL:  begin prod = 64'($signed(x)) * 64'($signed(y)); {want_hi, want} = prod; end
      OP_SLL:  want = x << y[4:0];
      OP_SRL:  want = x >> y[4:0];
      OP_SRA:  want = 32'($signed(x) >>> y[4:0]);
      default: want = '0;
    endcase
    checks++;
    if (r !== want || rh !== want_hi || c !== want_c || v !== want_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s %h,%h: got %h_%h c%0d v%0d want %h_%h c%0d v%0d",
                 o.name(), x, y, rh, r, c, v, want_hi, want, want_c, want_v);
    end
    op_count[o]++;
    if (want_c && (o == OP_ADD || o == OP_INC)) n_carry++;
    if (want_v) n_ovf++;
    if (o == OP_SUB && !want_c) n_borrow++;
    if (o == OP_MUL && want_hi[31]) n_negprod++;
    if (o == OP_SRA && x[31] && y[4:0] != 0) n_signfill++;
  endtask

  initial begin
    automatic logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000,
                                          32'hFFFF_FFFF, 32'hDEAD_BEEF};
    a = '0; b = '0; op = OP_ADD;
    foreach (op_count[k]) op_count[k] = 0;
    // one complete hand-worked operation per unit
    check(32'd25, 32'd17, OP_ADD);
    if (r !== 32'd42) failures++;
    check(32'hFFFF_FFF9, 32'd6, OP_MUL);          // -7 * 6 = -42
    if ({rh, r} !== 64'hFFFF_FFFF_FFFF_FFD6) failures++;
    for (int o = 0; o < 16; o++)
      foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j], alu_op_e'(o));
    for (int n = 0; n < 20000; n++) check($urandom, $urandom, alu_op_e'($urandom % 16));
    for (int o = 0; o < 16; o++) begin
      if (op_count[o] == 0) begin
        failures++;
        $display("operation %s never ran", alu_op_e'(o));
      end
    end
    $display("mechanisms: carry=%0d overflow=%0d borrow=%0d negative_product=%0d sign_fill=%0d",
             n_carry, n_ovf, n_borrow, n_negprod, n_signfill);
    if (n_carry == 0 || n_ovf == 0 || n_borrow == 0 || n_negprod == 0 || n_signfill == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
