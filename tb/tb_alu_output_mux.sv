// tb_alu_output_mux: self-checking test of the output selection
// multiplexer. Random values are driven on all unit inputs; for every unit
// select code the outputs must equal the selected unit's values, with the
// unused outputs at zero.
module tb_alu_output_mux;
  import alu_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  unit_sel_e   unit;
  logic [31:0] ar, lr, sr, r, rh;
  logic        ac, av, c, v;
  logic [63:0] mp;

  alu_output_mux dut (
    .unit(unit), .arith_result(ar), .arith_carry(ac), .arith_ovf(av),
    .logic_result(lr), .shift_result(sr), .mul_product(mp),
    .result(r), .result_hi(rh), .carry(c), .overflow(v)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [65:0] want;  // {carry, overflow, result_hi, result}
    for (int n = 0; n < 500; n++) begin
      ar = $urandom; lr = $urandom; sr = $urandom; mp = {$urandom, $urandom};
      ac = 1'($urandom); av = 1'($urandom);
      for (int u = 0; u < 8; u++) begin
        unit = unit_sel_e'(u);
        #1;
        case (u)
          1:       want = {ac, av, 32'h0, ar};
          2:       want = {2'b00, 32'h0, lr};
          3:       want = {2'b00, mp};
          4:       want = {2'b00, 32'h0, sr};
          default: want = '0;
        endcase
        checks++;
        if ({c, v, rh, r} !== want) begin
          failures++;
          if (failures < 10) $display("FAIL unit %0d: got %h want %h", u, {c, v, rh, r}, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
