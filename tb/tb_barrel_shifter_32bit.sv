// tb_barrel_shifter_32bit: self-checking test of the barrel shifter. Every
// shift amount 0..31 of every shift kind is tried on random data and
// compared with a bit-by-bit reference model.
module tb_barrel_shifter_32bit;
  import alu_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] a, r;
  logic [4:0]  sh;
  shift_op_e   op;

  barrel_shifter_32bit dut (.a(a), .shamt(sh), .op(op), .result(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input int n, input shift_op_e o);
    logic [31:0] want;
    a = x; sh = 5'(n); op = o;
    #1;
    for (int i = 0; i < 32; i++) begin
      unique case (o)
        SHIFT_SLL: want[i] = (i - n >= 0) ? x[i-n] : 1'b0;
        SHIFT_SRL: want[i] = (i + n < 32) ? x[i+n] : 1'b0;
        default:   want[i] = (i + n < 32) ? x[i+n] : x[31];
      endcase
    end
    checks++;
    if (r !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h by %0d: got %h want %h", o.name(), x, n, r, want);
    end
  endtask

  initial begin
    automatic shift_op_e ops [3] = '{SHIFT_SLL, SHIFT_SRL, SHIFT_SRA};
    a = '0; sh = '0; op = SHIFT_SLL;
    for (int rep = 0; rep < 50; rep++)
      foreach (ops[k])
        for (int n = 0; n < 32; n++) check((rep == 0) ? 32'h8000_0001 : $urandom, n, ops[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
