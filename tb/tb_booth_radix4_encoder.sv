// tb_booth_radix4_encoder: self-checking test of the Booth encoder. For each
// row the expected digit is worked out from the multiplier's bit triple as
// -2*b[2i+1] + b[2i] + b[2i-1]; the row value signed(pp[i]) + neg[i] must
// equal digit * a, and the weighted sum of all rows must equal a * b.
module tb_booth_radix4_encoder;

  logic               clk = 1'b0;
  int                 checks = 0, failures = 0;
  logic [31:0]        a, b;
  logic [15:0][32:0]  pp;
  logic [15:0]        neg;

  booth_radix4_encoder dut (.a(a), .b(b), .pp(pp), .neg(neg));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    longint total, row, digit;
    logic   bm1;
    a = x; b = y;
    #1;
    total = 0;
    for (int i = 0; i < 16; i++) begin
      bm1   = (i == 0) ? 1'b0 : y[2*i-1];
      digit = -2 * longint'(y[2*i+1]) + longint'(y[2*i]) + longint'(bm1);
      row   = longint'($signed(pp[i])) + longint'(neg[i]);
      checks++;
      if (row != digit * longint'($signed(x))) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d a=%h b=%h: row %0d digit %0d", i, x, y, row, digit);
      end
      total += row <<< (2 * i);
    end
    checks++;
    if (total != longint'($signed(x)) * longint'($signed(y))) begin
      failures++;
      if (failures < 10) $display("FAIL sum a=%h b=%h", x, y);
    end
  endtask

  initial begin
    a = '0; b = '0;
    check(32'h8000_0000, 32'h8000_0000);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h7FFF_FFFF, 32'h8000_0000);
    check(32'd12345, 32'hAAAA_AAAA);
    check(32'd7, 32'h5555_5555);
    for (int i = 0; i < 5000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
