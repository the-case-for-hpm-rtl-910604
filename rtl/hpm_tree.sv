// hpm_tree: logarithmic-depth reduction tree for the N x N Baugh-Wooley
// partial-product array, built only from full_adder (3:2) and half_adder
// (2:2) cells.
//
// Input: the N rows of N partial-product bits, pp[i][j] at weight 2^(i+j).
// Output: two 2N-bit rows, row_a and row_b, whose sum modulo 2^(2N) equals
// the sum of all partial-product bits plus the Baugh-Wooley constant 2^N.
// That constant is a '1' fed into column N as an ordinary adder input, so
// the adder that takes it is a full adder where the column would otherwise
// have needed a half adder; synthesis simplifies that cell.
//
// How it works: the columns are compressed in S adder levels. Before level
// s (counted from the input) every column must be no taller than the limit
// L(S-1-s), where L(0) = 2 and L(j+1) = floor(3/2 L(j)) = 3, 4, 6, 9, 13,
// 19, 28, 42, 63, 94. At each level a column uses just enough full adders,
// and at most one half adder, so that its remaining bits plus the carries
// arriving from the column below fit under the next limit. Sums stay in
// their column, carries move one column up, untouched bits pass straight
// down. S is the smallest j with L(j) >= N (tallest column: N bits), which
// is the logic depth the design's depth tables give: 4, 6, 8, 8, 9, 9, 9,
// 10 adders for N = 8, 16, 32, 40, 48, 54, 60, 64. Every column ends with
// at most N-2 adders for this array, as the design requires.
// The exact connection pattern of the published tree (which inputs share an
// adder) is this design's own choice; its depth and cell count match.
//
// Everything is combinational. The whole wiring pattern is computed at
// elaboration from N; DEPTH and MAX_COL_ADDERS are exported as localparams.
module hpm_tree
  import hpm_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      row_a,
  output logic [2*N-1:0]      row_b
);
  localparam int unsigned NC = 2 * N;        // product columns
  localparam int unsigned S  = tree_depth(N); // adder levels

  // Per level and column: height at the start of the level, and the full
  // and half adders the column uses at that level.
  typedef struct packed {
    logic [15:0] b;     // offset of the column in the level's bit vector
    logic [15:0] h;
    logic [15:0] f;
    logic [15:0] hh;
  } col_info_t;
  typedef col_info_t [NC-1:0] level_info_t;
  typedef level_info_t [S:0]  tree_info_t;

  // Initial height of column c: partial-product bits, plus the constant 1
  // in column N.
  function automatic int unsigned init_height(input int unsigned c);
    int unsigned h;
    h = (c < N) ? c + 1 : ((c <= 2*N-2) ? 2*N - 1 - c : 0);
    if (c == N) h++;
    return h;
  endfunction

  function automatic tree_info_t build_info();
    tree_info_t t;
    int unsigned lim, m, kin, e, f, hh;
    for (int unsigned s = 0; s <= S; s++)
      for (int unsigned c = 0; c < NC; c++) begin
        t[s][c].b  = '0;
        t[s][c].h  = '0;
        t[s][c].f  = '0;
        t[s][c].hh = '0;
      end
    for (int unsigned c = 0; c < NC; c++) t[0][c].h = 16'(init_height(c));
    for (int unsigned s = 0; s < S; s++) begin
      lim = stage_limit(S - 1 - s);
      kin = 0;
      for (int unsigned c = 0; c < NC; c++) begin
        m  = int'(t[s][c].h);
        e  = (m + kin > lim) ? m + kin - lim : 0;
        f  = e / 2;
        hh = e % 2;
        t[s][c].f    = 16'(f);
        t[s][c].hh   = 16'(hh);
        t[s+1][c].h  = 16'(m - 2*f - hh + kin);
        kin = f + hh;
      end
    end
    for (int unsigned s = 0; s <= S; s++) begin
      m = 0;
      for (int unsigned c = 0; c < NC; c++) begin
        t[s][c].b = 16'(m);
        m += int'(t[s][c].h);
      end
    end
    return t;
  endfunction

  localparam tree_info_t INFO = build_info();

  // Bit offset of column c in the flat signal vector of level s (c = NC
  // gives the vector's width).
  function automatic int unsigned col_base(input int unsigned s, input int unsigned c);
    if (c < NC) return int'(INFO[s][c].b);
    return int'(INFO[s][NC-1].b) + int'(INFO[s][NC-1].h);
  endfunction

  function automatic int unsigned col_adders(input int unsigned c);
    int unsigned a;
    a = 0;
    for (int unsigned s = 0; s < S; s++) a += int'(INFO[s][c].f) + int'(INFO[s][c].hh);
    return a;
  endfunction

  function automatic int unsigned max_col_adders();
    int unsigned a;
    a = 0;
    for (int unsigned c = 0; c < NC; c++) if (col_adders(c) > a) a = col_adders(c);
    return a;
  endfunction

  localparam int unsigned DEPTH          = S;
  localparam int unsigned MAX_COL_ADDERS = max_col_adders();

  for (genvar s = 0; s <= S; s++) begin : g_lvl
    localparam int unsigned TOT = col_base(s, NC);
    logic [TOT-1:0] v;

    for (genvar c = 0; c < NC; c++) begin : g_col
      localparam int unsigned H    = int'(INFO[s][c].h);
      localparam int unsigned F    = int'(INFO[s][c].f);
      localparam int unsigned HH   = int'(INFO[s][c].hh);
      localparam int unsigned BASE = col_base(s, c);

      // ---- where this level's bits come from ----
      if (s == 0) begin : g_src0
        localparam int unsigned ILO = (c >= N) ? c - N + 1 : 0;
        for (genvar r = 0; r < H; r++) begin : g_row
          if (c == N && r == H - 1) begin : g_one
            assign v[BASE + r] = 1'b1;          // Baugh-Wooley constant 2^N
          end else begin : g_pp
            assign v[BASE + r] = pp[ILO + r][c - ILO - r];
          end
        end
      end else begin : g_srcn
        // Layout of column c at level s, from level s-1:
        // [full-adder sums][half-adder sum][pass-through][carries from c-1]
        localparam int unsigned PM  = int'(INFO[s-1][c].h);
        localparam int unsigned PF  = int'(INFO[s-1][c].f);
        localparam int unsigned PHH = int'(INFO[s-1][c].hh);
        localparam int unsigned OWN = PM - 2*PF - PHH;   // bits of column c itself
        localparam int unsigned PB  = col_base(s-1, c);
        localparam int unsigned CF  = (c > 0) ? int'(INFO[s-1][(c > 0) ? c-1 : 0].f) : 0;
        for (genvar r = 0; r < H; r++) begin : g_row
          if (r < PF) begin : g_fs
            assign v[BASE + r] = g_lvl[s-1].g_col[c].g_fa[r].sum;
          end else if (r < PF + PHH) begin : g_hs
            assign v[BASE + r] = g_lvl[s-1].g_col[c].g_ha.g_cell.sum;
          end else if (r < OWN) begin : g_pass
            assign v[BASE + r] = g_lvl[s-1].v[PB + 3*PF + 2*PHH + (r - PF - PHH)];
          end else if (r - OWN < CF) begin : g_fc
            assign v[BASE + r] = g_lvl[s-1].g_col[c-1].g_fa[r - OWN].cy;
          end else begin : g_hc
            assign v[BASE + r] = g_lvl[s-1].g_col[c-1].g_ha.g_cell.cy;
          end
        end
      end

      // ---- this level's adders (none after the last level) ----
      if (s < S) begin : g_add
        if (3*F + 2*HH > H) begin : g_bad
          $error("hpm_tree: column %0d at level %0d has too few inputs", c, s);
        end
      end
      for (genvar i = 0; i < ((s < S) ? F : 0); i++) begin : g_fa
        logic sum, cy;
        full_adder u_fa (
          .a (v[BASE + 3*i]),
          .b (v[BASE + 3*i + 1]),
          .c (v[BASE + 3*i + 2]),
          .s (sum),
          .co(cy)
        );
      end
      if (s < S && HH != 0) begin : g_ha
        begin : g_cell
          logic sum, cy;
          half_adder u_ha (
            .a (v[BASE + 3*F]),
            .b (v[BASE + 3*F + 1]),
            .s (sum),
            .co(cy)
          );
        end
      end
    end
  end

  // ---- the two output rows ----
  for (genvar c = 0; c < NC; c++) begin : g_out
    localparam int unsigned H    = int'(INFO[S][c].h);
    localparam int unsigned BASE = col_base(S, c);
    if (H > 2) begin : g_bad
      $error("hpm_tree: column %0d is not reduced to two rows", c);
    end
    if (H >= 1) begin : g_a
      assign row_a[c] = g_lvl[S].v[BASE];
    end else begin : g_a0
      assign row_a[c] = 1'b0;
    end
    if (H >= 2) begin : g_b
      assign row_b[c] = g_lvl[S].v[BASE + 1];
    end else begin : g_b0
      assign row_b[c] = 1'b0;
    end
  end
endmodule
