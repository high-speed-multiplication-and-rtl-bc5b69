// mod_csla_group: one group of the modified carry select adder.
//
// A W-bit adder that, instead of two ripple carry adders or a binary-to-
// excess-1 converter, uses four small units:
//   HSG  one half adder per bit: half sum h[i] = a^b and generate g[i] = a&b.
//   CG0  carry chain for an incoming carry of 0:
//          c0[0] = g[0],          c0[i] = h[i]&c0[i-1] | g[i]
//   CG1  carry chain for an incoming carry of 1:
//          c1[0] = h[0] | g[0],   c1[i] = h[i]&c1[i-1] | g[i]
//   CS   carry selection, one cell per bit:  c[i] = c1[i]&cin | c0[i]
//        (correct because c0[i] implies c1[i])
//   FSG  full sum: s[0] = h[0]^cin, s[i] = h[i]^c[i-1]; cout = c[W-1].
// Every chain and selection cell is the shared ab+c cell. Both carry chains
// run before cin arrives, so the delay from cin to cout is one ab+c cell.
// The structure follows the 4-bit architecture of the design (W = 4); other
// widths repeat the same bit slice. Purely combinational.
module mod_csla_group #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] h, g;     // half sum generation
  logic [W-1:0] c0, c1;   // carry generation for cin = 0 and cin = 1
  logic [W-1:0] c;        // selected carries

  for (genvar i = 0; i < W; i++) begin : g_bit
    half_adder u_hsg (.a(a[i]), .b(b[i]), .h(h[i]), .g(g[i]));

    if (i == 0) begin : g_lsb
      assign c0[0] = g[0];
      assign c1[0] = h[0] | g[0];
      assign sum[0] = h[0] ^ cin;
    end else begin : g_upper
      ab_plus_c u_cg0 (.a(h[i]), .b(c0[i-1]), .c(g[i]), .x(c0[i]));
      ab_plus_c u_cg1 (.a(h[i]), .b(c1[i-1]), .c(g[i]), .x(c1[i]));
      assign sum[i] = h[i] ^ c[i-1];
    end

    ab_plus_c u_cs (.a(c1[i]), .b(cin), .c(c0[i]), .x(c[i]));
  end

  assign cout = c[W-1];
endmodule
