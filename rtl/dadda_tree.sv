// dadda_tree: Dadda reduction of the radix-4 Booth partial-product matrix.
//
// The WIDTH/2 rows from the Booth encoder are placed into 2*WIDTH columns:
// row i's low WIDTH bits at columns 2i.., its sign bit inverted at column
// 2i+WIDTH, and neg[i] at column 2i. Inverting a sign bit s adds 2^k while
// -s*2^k was meant, so the constant K = -sum_i 2^(WIDTH+2i) (mod 2^(2*WIDTH))
// is added as one more row; this replaces sign extension of every row.
//
// The matrix is then reduced with Dadda's schedule: the target heights are
// 2, 3, 4, 6, 9, 13, 19, ... (d[j+1] = floor(1.5*d[j])); each stage takes
// the largest target below the current maximum height and, column by
// column from the least significant, uses just enough full adders (3:2,
// height -2) and half adders (2:2, height -1) so that the column, counting
// the carries arriving from the column to its right in the same stage,
// ends at exactly the target. The last stage leaves two rows, sum_row and
// carry_row, whose sum modulo 2^(2*WIDTH) is the signed product. They go to
// a carry-propagate adder outside this block.
//
// Combinational. The schedule depends on WIDTH only, so constant functions
// work it out while elaborating (column heights, and how many full and half
// adders each column gets in each stage) and generate loops lay down the
// adders as a fixed network. Inside a column, the bits of layer l are kept
// in slots: full adders take slots 0..3*nfa-1, a half adder the next two,
// and the rest pass through; in layer l+1 a column holds its full-adder sums,
// then its half-adder sum, then the passed bits, then the carries of the
// column to its right. Reduction to two rows with carry-save
// adders follows the described tree; the sign handling and Dadda's standard
// height sequence are this design's choices.
module dadda_tree #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH,
  localparam int unsigned ROWS = WIDTH / 2,
  localparam int unsigned COLS = 2 * WIDTH
) (
  input  logic [ROWS-1:0][WIDTH:0] pp,
  input  logic [ROWS-1:0]          neg,
  output logic [COLS-1:0]          sum_row,
  output logic [COLS-1:0]          carry_row
);

  // A column holds at most ROWS partial-product bits, one neg bit and one
  // constant bit.
  localparam int MAXH = ROWS + 2;

  // Dadda target height of step j (j = 0 is the last step, target 2).
  function automatic int dadda_d(input int j);
    int d = 2;
    for (int k = 0; k < j; k++) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of stages: targets strictly below MAXH.
  function automatic int num_stages();
    int n = 0;
    while (dadda_d(n) < MAXH) n++;
    return n;
  endfunction

  localparam int STAGES = num_stages();

  // Sign-extension constant K = -sum_i 2^(WIDTH+2i) mod 2^COLS.
  function automatic logic [COLS-1:0] sign_const();
    logic [COLS-1:0] k = '0;
    for (int i = 0; i < int'(ROWS); i++) k = k - (COLS'(1) << (WIDTH + 2*i));
    return k;
  endfunction

  localparam logic [COLS-1:0] KCONST = sign_const();

  // First and last Booth row that has a bit in column c.
  function automatic int row_lo(input int c);
    return (c > int'(WIDTH)) ? (c - int'(WIDTH) + 1) / 2 : 0;
  endfunction
  function automatic int row_hi(input int c);
    return (c / 2 < int'(ROWS)) ? c / 2 : int'(ROWS) - 1;
  endfunction
  function automatic int n_rows(input int c);
    return (row_hi(c) >= row_lo(c)) ? row_hi(c) - row_lo(c) + 1 : 0;
  endfunction
  function automatic bit has_neg(input int c);
    return (c % 2 == 0) && (c / 2 < int'(ROWS));
  endfunction

  // Schedule, one entry per stage l and column c: [0] height of layer l,
  // [1] carries arriving from column c-1 in stage l, [2] full adders,
  // [3] half adders. Worked out once, by running Dadda's rule on heights.
  localparam int SCH_H = 0, SCH_CIN = 1, SCH_FA = 2, SCH_HA = 3;
  // Packed, 8 bits per entry, entry index (l*COLS + c)*4 + field.
  typedef logic [STAGES*COLS*4*8-1:0] sched_t;

  function automatic sched_t build_sched();
    sched_t t;
    int h [COLS];
    int cin, e, nfa, nha, tgt;
    for (int cc = 0; cc < int'(COLS); cc++)
      h[cc] = n_rows(cc) + int'(has_neg(cc)) + int'(KCONST[cc]);
    for (int ll = 0; ll < STAGES; ll++) begin
      tgt = dadda_d(STAGES - 1 - ll);
      cin = 0;
      for (int cc = 0; cc < int'(COLS); cc++) begin
        e   = h[cc] + cin - tgt;
        if (e < 0) e = 0;
        nfa = e / 2;
        nha = e % 2;
        t[((ll*int'(COLS) + cc)*4 + SCH_H)*8   +: 8] = 8'(h[cc]);
        t[((ll*int'(COLS) + cc)*4 + SCH_CIN)*8 +: 8] = 8'(cin);
        t[((ll*int'(COLS) + cc)*4 + SCH_FA)*8  +: 8] = 8'(nfa);
        t[((ll*int'(COLS) + cc)*4 + SCH_HA)*8  +: 8] = 8'(nha);
        h[cc] = h[cc] + cin - 2 * nfa - nha;
        cin   = nfa + nha;
      end
    end
    return t;
  endfunction

  localparam sched_t SCHED = build_sched();

  function automatic int sched(input int what, input int l, input int c);
    return int'(SCHED[((l*int'(COLS) + c)*4 + what)*8 +: 8]);
  endfunction

  // Slot k of column c in layer 0 is g_place[c].col[k]; in layer l+1 it is
  // g_stage[l].g_col[c].o[k]. Slots at or above a column's height are 0.
  // Layer STAGES holds the two output rows.

  // ---- layer 0: place the partial-product matrix ---------------------------
  for (genvar c = 0; c < int'(COLS); c++) begin : g_place
    logic [MAXH-1:0] col;
    for (genvar k = 0; k < MAXH; k++) begin : g_slot
      if (k < n_rows(c)) begin : g_pp
        localparam int I = row_lo(c) + k;
        localparam int J = c - 2 * I;
        if (J == int'(WIDTH)) begin : g_sign
          assign col[k] = ~pp[I][J];
        end else begin : g_bit
          assign col[k] = pp[I][J];
        end
      end else if (k == n_rows(c) && has_neg(c)) begin : g_neg
        assign col[k] = neg[c/2];
      end else if (k == n_rows(c) + int'(has_neg(c)) && KCONST[c]) begin : g_const
        assign col[k] = 1'b1;
      end else begin : g_zero
        assign col[k] = 1'b0;
      end
    end
  end

  // ---- Dadda stages ----------------------------------------------------------
  for (genvar l = 0; l < STAGES; l++) begin : g_stage
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      localparam int H    = sched(SCH_H,   l, c);
      localparam int CIN  = sched(SCH_CIN, l, c);
      localparam int NFA  = sched(SCH_FA,  l, c);
      localparam int NHA  = sched(SCH_HA,  l, c);
      localparam int USED = 3 * NFA + 2 * NHA;       // input slots consumed
      localparam int NOUT = NFA + NHA + (H - USED);  // outputs before carries
      // where the carries of this column land in column c+1 of layer l+1
      localparam int COFF = (c + 1 < int'(COLS))
                          ? sched(SCH_FA, l, c + 1) + sched(SCH_HA, l, c + 1)
                            + sched(SCH_H, l, c + 1)
                            - 3 * sched(SCH_FA, l, c + 1) - 2 * sched(SCH_HA, l, c + 1)
                          : 0;
      logic [MAXH-1:0] in_bits;                       // column c of layer l
      logic [MAXH-1:0] o;                             // column c of layer l+1
      logic [MAXH-1:0] cout;                          // carries towards c+1;
                                                      // dropped at the top column
      if (l == 0) begin : g_src_in
        assign in_bits = g_place[c].col;
      end else begin : g_src_prev
        assign in_bits = g_stage[l-1].g_col[c].o;
      end

      for (genvar k = 0; k < NFA; k++) begin : g_fa
        logic x, y, z;
        assign x = in_bits[3*k];
        assign y = in_bits[3*k+1];
        assign z = in_bits[3*k+2];
        assign o[k] = x ^ y ^ z;
        assign cout[k]      = (x & y) | (x & z) | (y & z);
      end
      if (NHA == 1) begin : g_ha
        assign o[NFA] = in_bits[USED-2] ^ in_bits[USED-1];
        assign cout[NFA]      = in_bits[USED-2] & in_bits[USED-1];
      end
      for (genvar k = NFA + NHA; k < MAXH; k++) begin : g_cout_zero
        assign cout[k] = 1'b0;
      end
      for (genvar k = NFA + NHA; k < MAXH; k++) begin : g_out
        if (k < NOUT) begin : g_pass
          assign o[k] = in_bits[USED + k - NFA - NHA];
        end else if (k < NOUT + CIN) begin : g_carry_in
          assign o[k] = g_stage[l].g_col[c-1].cout[k - NOUT];
        end else begin : g_zero
          assign o[k] = 1'b0;
        end
      end
      // Checks the schedule: the carries sent right match those expected there.
      if (c + 1 < int'(COLS) && sched(SCH_CIN, l, c + 1) != NFA + NHA) begin : g_bad
        $error("dadda_tree: inconsistent schedule at stage %0d column %0d", l, c);
      end
      if (USED > H || COFF < 0) begin : g_bad_use
        $error("dadda_tree: column %0d over-used at stage %0d", c, l);
      end
    end
  end

  for (genvar c = 0; c < int'(COLS); c++) begin : g_out_rows
    assign sum_row[c]   = g_stage[STAGES-1].g_col[c].o[0];
    assign carry_row[c] = g_stage[STAGES-1].g_col[c].o[1];
  end

endmodule
