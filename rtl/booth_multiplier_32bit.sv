// booth_multiplier_32bit: signed WIDTH x WIDTH -> 2*WIDTH multiplier.
//
// Three parts in a row, all combinational: the radix-4 Booth encoder makes
// WIDTH/2 partial products (half as many as a plain array multiplier), the
// Dadda tree compresses them with carry-save adders to two 2*WIDTH-bit rows,
// and a 2*WIDTH-bit Han-Carlson adder adds those rows into the product.
// Operands and product are two's complement. This structure is the one
// described for the multiplication unit; the widths of the final adder
// follow from the product width.
module booth_multiplier_32bit #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH,
  localparam int unsigned ROWS = WIDTH / 2
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] product
);

  logic [ROWS-1:0][WIDTH:0] pp;
  logic [ROWS-1:0]          neg;
  logic [2*WIDTH-1:0]       sum_row, carry_row;
  logic                     unused_cout, unused_ovf;

  booth_radix4_encoder #(.WIDTH(WIDTH)) u_booth (
    .a   (a),
    .b   (b),
    .pp  (pp),
    .neg (neg)
  );

  dadda_tree #(.WIDTH(WIDTH)) u_dadda (
    .pp        (pp),
    .neg       (neg),
    .sum_row   (sum_row),
    .carry_row (carry_row)
  );

  // carry_row already holds each carry at the column it feeds
  han_carlson_adder #(.WIDTH(2*WIDTH)) u_final_adder (
    .a    (sum_row),
    .b    (carry_row),
    .cin  (1'b0),
    .sum  (product),
    .cout (unused_cout),
    .ovf  (unused_ovf)
  );

endmodule
