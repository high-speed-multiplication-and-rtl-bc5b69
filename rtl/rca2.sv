// rca2: 2-bit ripple carry adder, the least significant block of the
// square-root carry select adder.
//
// Two full adders in series; the carry out feeds the first carry-select
// group. Purely combinational: {cout, sum} = a + b + cin.
module rca2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] sum,
  output logic       cout
);
  logic c1;

  full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(cin), .s(sum[0]), .co(c1));
  full_adder u_fa1 (.a(a[1]), .b(b[1]), .ci(c1),  .s(sum[1]), .co(cout));
endmodule
