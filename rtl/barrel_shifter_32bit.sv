// barrel_shifter_32bit: logarithmic barrel shifter.
//
// Shifts a by shamt (0..WIDTH-1) positions: logical left, logical right or
// arithmetic right. Right shifts are done by log2(WIDTH) stages of 2:1
// multiplexers, stage k shifting by 2^k when shamt[k] is set, with the fill
// bit being zero or a's sign bit. Left shifts reuse the same stages on the
// bit-reversed operand and reverse the result back. Combinational.
// Only the unit's name and its place next to the logic unit in the ALU are
// given; the three shift kinds, the shared right-shift stages and taking the
// amount from the low bits of the second operand are this design's choices.
module barrel_shifter_32bit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH,
  localparam int unsigned SW = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [SW-1:0]    shamt,
  input  shift_op_e        op,
  output logic [WIDTH-1:0] result
);

  function automatic logic [WIDTH-1:0] bitrev(input logic [WIDTH-1:0] v);
    for (int i = 0; i < int'(WIDTH); i++) bitrev[i] = v[WIDTH-1-i];
  endfunction

  always_comb begin
    logic [WIDTH-1:0] stage;
    logic             fill;
    stage = (op == SHIFT_SLL) ? bitrev(a) : a;
    fill  = (op == SHIFT_SRA) ? a[WIDTH-1] : 1'b0;
    for (int k = 0; k < int'(SW); k++) begin
      // stage k: move right by 2^k, filling the vacated top bits
      if (shamt[k])
        stage = (stage >> (1 << k)) | ({WIDTH{fill}} & ~({WIDTH{1'b1}} >> (1 << k)));
    end
    result = (op == SHIFT_SLL) ? bitrev(stage) : stage;
  end

endmodule
