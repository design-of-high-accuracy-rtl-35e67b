// csa_tree: carry-save reduction of ROWS aligned W-bit rows to two rows.
//
// Each level takes the rows in groups of five and reduces every group to two
// rows with a row of 5-2 compressors. In that row, column k passes cout1 and
// cout2 to cin1 and cin2 of column k+1. If three or four rows are left over,
// a (3,2) carry-save adder reduces three of them to two. The last row, if
// any, passes through. Levels repeat, each built by a generate loop, until
// two rows are left. 18 rows (the 32-bit multiplier) take four
// levels: 18 -> 8 -> 4 -> 3 -> 2.
// All arithmetic is modulo 2^W, so carries out of the top column are dropped.
// Invariant: sum_out + carry_out == sum of rows (mod 2^W). Purely combinational.
// A tree of 5-2 compressors and (3,2) adders is what the published design
// calls for. The grouping into levels is this design's own.
module csa_tree #(
  parameter int unsigned ROWS       = 18,
  parameter int unsigned W          = 36,
  parameter bit          HIGH_SPEED = 1'b1  // 5-2 compressor realization
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum_out,
  output logic [W-1:0]           carry_out
);

  // Rows left after one level applied to r rows.
  function automatic int unsigned next_rows(int unsigned r);
    int unsigned rem;
    if (r <= 2) return r;
    rem = r % 5;
    return 2 * (r / 5) + ((rem >= 3) ? rem - 1 : rem);
  endfunction

  // Rows present at the input of level l.
  function automatic int unsigned rows_at(int unsigned r, int unsigned l);
    int unsigned n = r;
    for (int unsigned i = 0; i < l; i++) n = next_rows(n);
    return n;
  endfunction

  // Number of levels until two rows (or fewer) remain.
  function automatic int unsigned num_levels(int unsigned r);
    int unsigned n = r, l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(ROWS);
  localparam int unsigned MAXR   = (ROWS > 2) ? ROWS : 2;

  logic [MAXR-1:0][W-1:0] rows_in;  // input rows, padded with zero rows

  for (genvar r = 0; r < MAXR; r++) begin : g_in
    assign rows_in[r] = (r < ROWS) ? rows[(r < ROWS) ? r : 0] : '0;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned RL   = rows_at(ROWS, l);
    localparam int unsigned N5   = RL / 5;
    localparam int unsigned REM  = RL % 5;
    localparam int unsigned N3   = (REM >= 3) ? 1 : 0;
    localparam int unsigned PASS = REM - 3 * N3;
    localparam int unsigned NEXT = 2 * N5 + 2 * N3 + PASS;

    logic [MAXR-1:0][W-1:0] cur;  // rows entering this level
    logic [MAXR-1:0][W-1:0] nxt;  // rows leaving it; unused slots are zero

    if (l == 0) begin : g_first
      assign cur = rows_in;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end

    // Groups of five rows: one row of 5-2 compressors each.
    for (genvar g = 0; g < N5; g++) begin : g_c52
      logic [W-1:0] s, cy, c1, c2;
      for (genvar k = 0; k < W; k++) begin : g_col
        compressor_5_2 #(.HIGH_SPEED(HIGH_SPEED)) u_cmp (
          .x1   (cur[5*g+0][k]),
          .x2   (cur[5*g+1][k]),
          .x3   (cur[5*g+2][k]),
          .x4   (cur[5*g+3][k]),
          .x5   (cur[5*g+4][k]),
          .cin1 ((k == 0) ? 1'b0 : c1[(k == 0) ? 0 : k-1]),
          .cin2 ((k == 0) ? 1'b0 : c2[(k == 0) ? 0 : k-1]),
          .cout1(c1[k]),
          .cout2(c2[k]),
          .carry(cy[k]),
          .sum  (s[k])
        );
      end
      assign nxt[2*g]   = s;
      assign nxt[2*g+1] = {cy[W-2:0], 1'b0};
    end

    // Three left-over rows: one (3,2) carry-save adder.
    if (N3 == 1) begin : g_c32
      csa_3_2 #(.W(W)) u_csa (
        .a (cur[5*N5+0]),
        .b (cur[5*N5+1]),
        .c (cur[5*N5+2]),
        .s (nxt[2*N5]),
        .co(nxt[2*N5+1])
      );
    end

    // Any remaining row passes to the next level unchanged.
    for (genvar p = 0; p < PASS; p++) begin : g_pass
      assign nxt[2*N5+2*N3+p] = cur[5*N5+3*N3+p];
    end

    for (genvar z = NEXT; z < MAXR; z++) begin : g_zero
      assign nxt[z] = '0;
    end
  end

  if (LEVELS == 0) begin : g_none
    assign sum_out   = rows_in[0];
    assign carry_out = rows_in[1];
  end else begin : g_out
    assign sum_out   = g_level[LEVELS-1].nxt[0];
    assign carry_out = g_level[LEVELS-1].nxt[1];
  end

endmodule
