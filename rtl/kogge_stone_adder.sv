// kogge_stone_adder: W-bit parallel-prefix carry-propagate adder (Kogge-Stone).
//
// Used as the final adder of the multiplier: it adds the two rows left by
// the reduction tree. Bit generate/propagate pairs are combined in
// ceil(log2 W) prefix levels; at level k every position i >= 2^k merges with
// position i - 2^k, so each level has full fan-in and no position waits for
// another level. The sum is p[i] ^ carry-into-i. Combinational; the carry out
// of the top bit is given as cout. W must be at least 2.
module kogge_stone_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LEVELS = $clog2(W);

  if (W < 2) begin : g_bad
    $error("kogge_stone_adder: W must be at least 2");
  end

  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned DIST = 1 << k;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= DIST) begin : g_merge
        assign g[k+1][i] = g[k][i] | (p[k][i] & g[k][i-DIST]);
        assign p[k+1][i] = p[k][i] & p[k][i-DIST];
      end else begin : g_pass
        assign g[k+1][i] = g[k][i];
        assign p[k+1][i] = p[k][i];
      end
    end
  end

  // g[LEVELS][i] is the carry out of bit i (no carry into bit 0).
  assign sum  = p[0] ^ {g[LEVELS][W-2:0], 1'b0};
  assign cout = g[LEVELS][W-1];
endmodule
