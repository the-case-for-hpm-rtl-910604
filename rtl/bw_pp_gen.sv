// bw_pp_gen: Baugh-Wooley partial-product generation for an N x N signed
// (two's complement) multiplication, in Hatamian's arrangement.
//
// Row i holds the bits x[j] & y[i] at weight 2^(i+j). To make the signed
// product a plain sum of positive-weight bits:
//   * the MSB (j = N-1) of rows 0 .. N-2 is inverted (NAND instead of AND),
//   * every bit of the last row (i = N-1) except its MSB is inverted.
// The two remaining corrections, a constant 1 in column N and an inverted
// MSB of the final result, belong to hpm_tree and bw_multiplier.
// One 2-input AND or NAND gate per bit; combinational.
//
// Interface: pp[i][j] is row i, bit j (weight 2^(i+j)).
// The drive-sharing inverters on the operand inputs of the physical design
// (at most 10 gates per inverter) have no logic function and are not
// modelled.
module bw_pp_gen #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [N-1:0][N-1:0]  pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        // Inverted bits: MSB of rows 0..N-2, and all but the MSB of row N-1.
        if ((i == N-1) != (j == N-1)) pp[i][j] = ~(x[j] & y[i]);
        else                          pp[i][j] =   x[j] & y[i];
      end
    end
  end
endmodule
