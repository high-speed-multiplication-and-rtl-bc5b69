// ab_plus_c: the shared AND-OR carry cell x = (a & b) | c.
//
// The modified carry select adder builds both of its carry generation chains
// and its carry selection unit out of this one cell. In a carry chain a is the
// bit's half sum (propagate), b the carry from the bit below and c the bit's
// generate; in the selection unit a is the carry computed for an incoming
// carry of 1, b the real incoming carry and c the carry computed for an
// incoming carry of 0. Purely combinational.
module ab_plus_c (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x
);
  assign x = (a & b) | c;
endmodule
