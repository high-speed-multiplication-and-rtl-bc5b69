// full_adder: adds three bits of equal weight into a sum and a carry.
//
// Used for the 2-bit ripple carry adder at the bottom of the square-root
// carry select adder and as the 3:2 cell of the Wallace reduction.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
