// full_adder: the 3:2 counter cell the reduction tree is built from.
//
// Adds three bits of equal weight and returns their two-bit count as a sum
// bit (same weight) and a carry bit (next weight up). Purely combinational.
// The tree uses nothing but these cells and the half_adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);
endmodule
