// half_adder: half sum generation for one bit pair.
//
// h = a ^ b is the half sum (also the carry propagate) and g = a & b the
// carry generate. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic h,
  output logic g
);
  assign h = a ^ b;
  assign g = a & b;
endmodule
