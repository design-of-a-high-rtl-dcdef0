// tb_han_carlson_adder: self-checking test of the Han-Carlson adder.
//
// Drives the 32-bit default instance, plus a 64-bit instance (the width the
// multiplier's final adder uses) and an odd 13-bit one, with corner cases
// and random operands and carry in. Sum, carry out and overflow are
// compared with values from the simulator's own wide addition.
module tb_han_carlson_adder;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;

  logic [31:0] a32, b32, s32;  logic cin32, co32, ov32;
  logic [63:0] a64, b64, s64;  logic cin64, co64, ov64;
  logic [12:0] a13, b13, s13;  logic cin13, co13, ov13;

  han_carlson_adder                dut32 (.a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(co32), .ovf(ov32));
  han_carlson_adder #(.WIDTH(64))  dut64 (.a(a64), .b(b64), .cin(cin64), .sum(s64), .cout(co64), .ovf(ov64));
  han_carlson_adder #(.WIDTH(13))  dut13 (.a(a13), .b(b13), .cin(cin13), .sum(s13), .cout(co13), .ovf(ov13));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] ref_sum;
    logic        ref_ovf;
    a32 = x; b32 = y; cin32 = c;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + 33'(c);
    ref_ovf = (x[31] == y[31]) && (ref_sum[31] != x[31]);
    checks++;
    if ({co32, s32} !== ref_sum || ov32 !== ref_ovf) begin
      failures++;
      if (failures < 10)
        $display("FAIL32 %h + %h + %0d: got %0d:%h ovf %0d, want %h ovf %0d",
                 x, y, c, co32, s32, ov32, ref_sum, ref_ovf);
    end
  endtask

  task automatic check64(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] ref_sum;
    logic        ref_ovf;
    a64 = x; b64 = y; cin64 = c;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + 65'(c);
    ref_ovf = (x[63] == y[63]) && (ref_sum[63] != x[63]);
    checks++;
    if ({co64, s64} !== ref_sum || ov64 !== ref_ovf) begin
      failures++;
      if (failures < 10) $display("FAIL64 %h + %h + %0d", x, y, c);
    end
  endtask

  task automatic check13(input logic [12:0] x, input logic [12:0] y, input logic c);
    logic [13:0] ref_sum;
    logic        ref_ovf;
    a13 = x; b13 = y; cin13 = c;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + 14'(c);
    ref_ovf = (x[12] == y[12]) && (ref_sum[12] != x[12]);
    checks++;
    if ({co13, s13} !== ref_sum || ov13 !== ref_ovf) begin
      failures++;
      if (failures < 10) $display("FAIL13 %h + %h + %0d", x, y, c);
    end
  endtask

  initial begin
    a32 = '0; b32 = '0; cin32 = 0; a64 = '0; b64 = '0; cin64 = 0; a13 = '0; b13 = '0; cin13 = 0;
    // corner cases: full carry chains, sign boundaries
    check32(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check32(32'h0000_0000, 32'h0000_0000, 1'b0);
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'h1, 1'b0);
    check64(64'h7FFF_FFFF_FFFF_FFFF, 64'h0, 1'b1);
    check13(13'h1FFF, 13'h0, 1'b1);
    // single-bit generate at each position with a propagate run above it
    for (int i = 0; i < 32; i++) check32(32'hFFFF_FFFF << i, 32'h1 << i, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      check32($urandom, $urandom, 1'($urandom));
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
      check13(13'($urandom), 13'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
