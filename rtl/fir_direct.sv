// fir_direct: direct-form FIR filter, y(n) = sum_{k=0}^{N_TAPS-1} coef[k] * x(n-k).
//
// A tapped delay line holds the last N_TAPS-1 input samples. Tap k multiplies
// x(n-k) by coef[k] in a MAC unit (reduced complexity Wallace multiplier plus
// a modified square-root carry select adder) and adds it to the partial sum
// passed along from tap k-1; tap 0 starts from zero and the last tap's sum is
// y. The adder chain runs in the same order as the delay line.
//
// Interface and timing:
//   x_in, en   x_in is the current sample x(n). On a rising clk edge with en
//              high the delay line shifts: x(n) becomes x(n-1), and so on.
//   coef       N_TAPS unsigned W-bit coefficients, taken from ports so they
//              may change at any time (the general multipliers need no
//              constant coefficients).
//   y          combinational: the output for the sample now on x_in and the
//              samples stored in the delay line, modulo 2^ACC_W.
//   ovf        high when any adder of the chain carried out, i.e. the true sum
//              did not fit in ACC_W bits and y has wrapped.
//   rst_n      asynchronous active-low reset; clears the delay line to zero.
// The delay line, one multiplier and adder per tap, 8-bit coefficients and
// 16-bit products follow the design. Unsigned samples, the sample enable,
// the reset, the 16-bit accumulation with an overflow flag and N_TAPS = 8
// are this implementation's choices.
module fir_direct #(
  parameter int N_TAPS = 8,
  parameter int W      = 8,
  parameter int ACC_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [W-1:0]     x_in,
  input  logic [W-1:0]     coef [N_TAPS],
  output logic [ACC_W-1:0] y,
  output logic             ovf
);
  logic [W-1:0]     xd   [N_TAPS];     // xd[k] = x(n-k); xd[0] is x_in
  logic [ACC_W-1:0] psum [N_TAPS+1];   // partial sum entering tap k
  logic [N_TAPS-1:0] tap_cout;

  // ---- delay line (z^-1 chain) -------------------------------------------
  assign xd[0] = x_in;

  for (genvar k = 1; k < N_TAPS; k++) begin : g_delay
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  xd[k] <= '0;
      else if (en) xd[k] <= xd[k-1];
    end
  end

  // ---- one MAC per tap, chained ---------------------------------------------
  assign psum[0] = '0;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    mac_unit #(.W(W), .ACC_W(ACC_W)) u_mac (
      .x(xd[k]), .c(coef[k]), .acc_in(psum[k]),
      .acc_out(psum[k+1]), .acc_cout(tap_cout[k])
    );
  end

  assign y   = psum[N_TAPS];
  assign ovf = |tap_cout;
endmodule
