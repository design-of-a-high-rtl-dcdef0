// tb_dadda_tree: self-checking test of the Dadda reduction tree. Random
// partial-product rows and negation bits are driven (the tree must reduce
// any such matrix, not only those a Booth encoder makes); the two output
// rows must add, modulo 2^(2*WIDTH), to sum_i (signed(pp[i]) + neg[i]) * 4^i.
// The default 32-bit instance and an 8-bit one are tested.
module tb_dadda_tree;

  logic               clk = 1'b0;
  int                 checks = 0, failures = 0;

  logic [15:0][32:0]  pp32;
  logic [15:0]        neg32;
  logic [63:0]        s32, c32;
  logic [3:0][8:0]    pp8;
  logic [3:0]         neg8;
  logic [15:0]        s8, c8;

  dadda_tree                dut32 (.pp(pp32), .neg(neg32), .sum_row(s32), .carry_row(c32));
  dadda_tree #(.WIDTH(8))   dut8  (.pp(pp8),  .neg(neg8),  .sum_row(s8),  .carry_row(c8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32();
    logic [63:0] want;
    want = '0;
    for (int i = 0; i < 16; i++)
      want += (64'($signed(pp32[i])) + 64'(neg32[i])) << (2 * i);
    checks++;
    if (s32 + c32 !== want) begin
      failures++;
      if (failures < 10) $display("FAIL32: got %h want %h", s32 + c32, want);
    end
  endtask

  task automatic check8();
    logic [15:0] want;
    want = '0;
    for (int i = 0; i < 4; i++)
      want += (16'($signed(pp8[i])) + 16'(neg8[i])) << (2 * i);
    checks++;
    if (16'(s8 + c8) !== want) begin
      failures++;
      if (failures < 10) $display("FAIL8: got %h want %h", 16'(s8 + c8), want);
    end
  endtask

  initial begin
    // all ones and all zeros: maximum column heights with carries everywhere
    for (int i = 0; i < 16; i++) pp32[i] = '1;
    neg32 = '1; pp8 = '1; neg8 = '1; #1; check32(); check8();
    pp32 = '0; neg32 = '0; pp8 = '0; neg8 = '0; #1; check32(); check8();
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 16; i++) pp32[i] = {1'($urandom), $urandom};
      neg32 = 16'($urandom);
      for (int i = 0; i < 4; i++) pp8[i] = 9'($urandom);
      neg8 = 4'($urandom);
      #1;
      check32();
      check8();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
