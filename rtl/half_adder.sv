// half_adder: the 2:2 counter cell of the reduction tree.
//
// Adds two bits of equal weight: sum bit (same weight) and carry bit (next
// weight up). Purely combinational. The tree places one wherever a column
// must shed exactly one more signal than its full adders remove.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
