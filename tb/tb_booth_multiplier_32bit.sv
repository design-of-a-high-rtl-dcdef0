// tb_booth_multiplier_32bit: self-checking test of the signed multiplier.
// Corner operands (most negative, -1, 0, largest positive) and random
// operands are multiplied; the 64-bit product is compared with the
// simulator's signed multiplication. An 8-bit instance is checked
// exhaustively over all 65536 operand pairs.
module tb_booth_multiplier_32bit;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [63:0] p;
  logic [7:0]  a8, b8;
  logic [15:0] p8;

  booth_multiplier_32bit             dut   (.a(a),  .b(b),  .product(p));
  booth_multiplier_32bit #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .product(p8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic signed [63:0] want;
    a = x; b = y;
    #1;
    want = 64'($signed(x)) * 64'($signed(y));
    checks++;
    if (p !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h want %h", x, y, p, want);
    end
  endtask

  initial begin
    automatic logic [31:0] corner [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                                32'h8000_0000, 32'h0001_0000, 32'hAAAA_AAAA};
    a = '0; b = '0; a8 = '0; b8 = '0;
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    // hand-worked values
    a = 32'd1000; b = -32'sd3; #1; checks++;
    if (p !== -64'sd3000) failures++;
    for (int i = 0; i < 20000; i++) check($urandom, $urandom);
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (p8 !== 16'(16'($signed(a8)) * 16'($signed(b8)))) begin
          failures++;
          if (failures < 10) $display("FAIL8 %h * %h: got %h", a8, b8, p8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
