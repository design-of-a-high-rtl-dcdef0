// booth_radix4_encoder: radix-4 (modified) Booth recoding and partial
// product generation for a signed WIDTH x WIDTH multiply.
//
// The multiplier b is scanned in WIDTH/2 overlapping 3-bit groups
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0). Each group selects a digit in
// {-2,-1,0,+1,+2}:
//   000,111 -> 0   001,010 -> +1   011 -> +2   100 -> -2   101,110 -> -1
// Partial product i is the multiplicand a, sign-extended to WIDTH+1 bits,
// times |digit| (zero, a, or a shifted left by one), bitwise inverted when
// the digit is negative. neg[i] flags that inversion; the +1 that completes
// the two's complement is added later, in the reduction tree, at the row's
// least significant column. Row i carries weight 4^i.
// So the signed product is sum_i (signed(pp[i]) + neg[i]) * 4^i.
//
// Combinational. Grouping, halving of the row count and signed operation
// follow the described encoder; the one's-complement-plus-neg form of the
// rows is this design's choice. WIDTH must be even.
module booth_radix4_encoder #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH,
  localparam int unsigned ROWS = WIDTH / 2
) (
  input  logic [WIDTH-1:0]           a,    // multiplicand (signed)
  input  logic [WIDTH-1:0]           b,    // multiplier (signed)
  output logic [ROWS-1:0][WIDTH:0]   pp,   // partial products, WIDTH+1 bits
  output logic [ROWS-1:0]            neg   // row is negated (add 1 at LSB)
);

  logic [WIDTH:0] b_ext;   // {b, 0}: b_ext[k+1] = b[k], b_ext[0] = b[-1] = 0
  assign b_ext = {b, 1'b0};

  always_comb begin
    logic [2:0]     grp;
    logic           one, two;
    logic [WIDTH:0] mag;
    for (int i = 0; i < int'(ROWS); i++) begin
      grp    = b_ext[2*i +: 3];
      one    = grp[1] ^ grp[0];
      two    = (grp == 3'b011) || (grp == 3'b100);
      neg[i] = grp[2];
      if (one)      mag = {a[WIDTH-1], a};
      else if (two) mag = {a, 1'b0};
      else          mag = '0;
      pp[i]  = grp[2] ? ~mag : mag;
    end
  end

endmodule
