// bw_multiplier: combinational N x N two's-complement multiplier using the
// Baugh-Wooley algorithm on a logarithmic-depth (HPM-style) reduction tree.
//
// Datapath, in order:
//   1. bw_pp_gen   - one AND or NAND gate per partial-product bit (N*N bits),
//   2. hpm_tree    - full/half-adder tree, with the constant 1 of column N,
//                    reducing the array to two 2N-bit rows,
//   3. kogge_stone_adder - 2N-bit parallel-prefix final adder,
//   4. one inverter on the MSB of the sum (the last Baugh-Wooley correction).
// The result p is the full 2N-bit signed product x * y; there is no
// overflow. The critical path is one gate, DEPTH adder levels, and the
// log2(2N) prefix levels of the final adder.
module bw_multiplier #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      row_a, row_b, sum;
  logic                cout_unused;

  bw_pp_gen #(.N(N)) u_pp (
    .x (x),
    .y (y),
    .pp(pp)
  );

  hpm_tree #(.N(N)) u_tree (
    .pp   (pp),
    .row_a(row_a),
    .row_b(row_b)
  );

  // The carry out of the top bit has weight 2^(2N) and is discarded: the
  // Baugh-Wooley sum is only meaningful modulo 2^(2N).
  kogge_stone_adder #(.W(2*N)) u_fadd (
    .a   (row_a),
    .b   (row_b),
    .sum (sum),
    .cout(cout_unused)
  );

  assign p = {~sum[2*N-1], sum[2*N-2:0]};
endmodule
