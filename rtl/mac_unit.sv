// mac_unit: multiply and accumulate, acc_out = acc_in + x * c.
//
// The multiplier is the reduced complexity Wallace multiplier (whose own final
// adder is a modified square-root carry select adder); its 2W-bit product is
// zero-extended to ACC_W bits and added to the incoming partial sum by a
// second modified square-root carry select adder. This is one tap of the
// direct-form filter: a multiplier feeding one adder of the output chain.
// Operands are unsigned. acc_cout is the carry out of the accumulation adder,
// i.e. acc_out wrapped modulo 2^ACC_W. Purely combinational.
// The 8-bit operands and 16-bit product follow the design; ACC_W = 16, the
// width of its carry select adder, is this implementation's choice for the
// accumulation path.
module mac_unit #(
  parameter int W     = 8,
  parameter int ACC_W = 16
) (
  input  logic [W-1:0]     x,
  input  logic [W-1:0]     c,
  input  logic [ACC_W-1:0] acc_in,
  output logic [ACC_W-1:0] acc_out,
  output logic             acc_cout
);
  logic [2*W-1:0] prod;

  rc_wallace_mult #(.W(W)) u_mult (.a(x), .b(c), .p(prod));

  mod_sqrt_csla #(.WIDTH(ACC_W)) u_acc (
    .a(acc_in), .b(ACC_W'(prod)), .cin(1'b0),
    .sum(acc_out), .cout(acc_cout)
  );

  initial assert (ACC_W >= 2 * W)
    else $error("mac_unit: ACC_W (%0d) must hold the %0d-bit product", ACC_W, 2 * W);
endmodule
