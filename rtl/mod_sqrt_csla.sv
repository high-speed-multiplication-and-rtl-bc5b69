// mod_sqrt_csla: square-root carry select adder built from modified groups.
//
// {cout, sum} = a + b + cin. Bits [1:0] are a 2-bit ripple carry adder; above
// it sit modified carry-select groups of 2, 3, 4, 5, ... bits, so the default
// 16-bit adder is split [1:0] [3:2] [6:4] [10:7] [15:11]. Every group forms
// both of its carry chains at once, in parallel with the others, and only the
// carry selection ripples from group to group: a group's carry out is one
// ab+c cell after its carry in. The growing group sizes balance a group's own
// chain delay against the arrival time of its carry in.
// WIDTH = 16 is the size of the design; other widths keep the partition rule
// and cut the last group short. Purely combinational.
module mod_sqrt_csla
  import arith_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = csla_ngroups(WIDTH);

  logic [NG:0] carry;   // carry[g] enters group g

  assign carry[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LO = csla_lo(g);
    localparam int SZ = csla_size(g, WIDTH);
    if (g == 0 && SZ == 2) begin : g_rca
      rca2 u_rca (
        .a(a[1:0]), .b(b[1:0]), .cin(carry[0]),
        .sum(sum[1:0]), .cout(carry[1])
      );
    end else begin : g_csla
      mod_csla_group #(.W(SZ)) u_grp (
        .a(a[LO+SZ-1:LO]), .b(b[LO+SZ-1:LO]), .cin(carry[g]),
        .sum(sum[LO+SZ-1:LO]), .cout(carry[g+1])
      );
    end
  end

  assign cout = carry[NG];
endmodule
