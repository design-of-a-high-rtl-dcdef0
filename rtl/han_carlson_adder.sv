// han_carlson_adder: WIDTH-bit Han-Carlson parallel-prefix adder.
//
// Bitwise generate g = a&b and propagate p = a^b are formed in parallel; the
// carry in is folded into bit 0's generate. The prefix network is the
// Han-Carlson hybrid: a Brent-Kung style first level combines every odd bit
// with its even neighbour, a Kogge-Stone tree of log2(WIDTH)-1 levels then
// runs on the odd positions only (spans 2, 4, 8, ...), and one Brent-Kung
// style last level completes the even positions from their odd neighbour.
// This halves the Kogge-Stone cell count and wiring for one extra level.
// sum[i] = p[i] ^ carry[i]; cout is the carry out of the top bit and ovf is
// two's complement overflow (carry into the top bit xor carry out of it).
//
// Purely combinational, no clock. The hybrid structure and the g/p/prefix
// formulation follow the described adder; WIDTH may be any value >= 2, and
// the overflow output is this design's addition.
module han_carlson_adder #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             ovf
);

  logic [WIDTH-1:0] p;       // bitwise propagate, also used for the sum
  logic [WIDTH-1:0] grp_g;   // group generate G[i:0] once the tree is done
  logic [WIDTH:0]   carry;   // carry[i] = carry into bit i

  always_comb begin
    logic [WIDTH-1:0] g_cur, p_cur, g_nxt, p_nxt;
    p     = a ^ b;
    g_cur = a & b;
    p_cur = p;
    // carry in acts as a generate below bit 0
    g_cur[0] = g_cur[0] | (p[0] & cin);

    // level 1 (Brent-Kung style): odd bits absorb their even neighbour
    g_nxt = g_cur;
    p_nxt = p_cur;
    for (int i = 1; i < int'(WIDTH); i += 2) begin
      g_nxt[i] = g_cur[i] | (p_cur[i] & g_cur[i-1]);
      p_nxt[i] = p_cur[i] & p_cur[i-1];
    end
    g_cur = g_nxt;
    p_cur = p_nxt;

    // Kogge-Stone levels on odd positions only
    for (int d = 2; d < int'(WIDTH); d *= 2) begin
      g_nxt = g_cur;
      p_nxt = p_cur;
      for (int i = 1; i < int'(WIDTH); i += 2) begin
        if (i - d >= 1) begin
          g_nxt[i] = g_cur[i] | (p_cur[i] & g_cur[i-d]);
          p_nxt[i] = p_cur[i] & p_cur[i-d];
        end
      end
      g_cur = g_nxt;
      p_cur = p_nxt;
    end

    // last level (Brent-Kung style): even bits take their odd neighbour
    g_nxt = g_cur;
    for (int i = 2; i < int'(WIDTH); i += 2) begin
      g_nxt[i] = g_cur[i] | (p_cur[i] & g_cur[i-1]);
    end
    grp_g = g_nxt;

    carry[0] = cin;
    for (int i = 1; i <= int'(WIDTH); i++) carry[i] = grp_g[i-1];
  end

  assign sum  = p ^ carry[WIDTH-1:0];
  assign cout = carry[WIDTH];
  assign ovf  = carry[WIDTH] ^ carry[WIDTH-1];

endmodule
