// rc_wallace_mult: unsigned W x W reduced complexity Wallace multiplier.
//
// p = a * b, purely combinational.
//   1. Partial products: W*W AND gates; row i is (b & {W{a[i]}}) << i, which
//      gives the triangular (diamond) dot matrix.
//   2. Reduction: each stage splits the rows into groups of three. In every
//      column of a group, three bits enter a full adder (sum to the group's
//      sum row, carry one column up in its carry row); a single bit or a pair
//      of bits moves on unchanged. Only where a pair meets a carry-row slot
//      already filled by the carry from the column below does a half adder
//      take the pair. Rows left over after grouping pass to the next stage.
//      Rows go 8 -> 6 -> 4 -> 3 -> 2 for W = 8, four stages.
//   3. Final addition: the last two rows are added by the modified
//      square-root carry select adder (2W = 16 bits for W = 8).
// AND-gate partial products, three-row groups, full adders on three bits,
// pass-through of single bits and pairs, four stages for W = 8 and the
// carry select final adder follow the original architecture; the half-adder
// rule for colliding pairs is this implementation's own.
// The per-column choices are worked out at elaboration by arith_pkg from the
// valid-bit masks of the rows, so every parameter value gets its own netlist.
// The column-16 carry of the last adders is never 1 (the product fits in 2W
// bits), so it is left unused, as is the final adder's carry out.
module rc_wallace_mult
  import arith_pkg::*;
#(
  parameter int W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int C    = 2 * W;
  localparam int NS   = rcw_stages(W);
  localparam int MAXR = (W < 2) ? 2 : W;

  logic [C-1:0] pp [MAXR];   // partial product rows

  // ---- partial product generation ----------------------------------------
  for (genvar i = 0; i < MAXR; i++) begin : g_pp
    if (i < W) begin : g_row
      assign pp[i] = C'(b & {W{a[i]}}) << i;
    end else begin : g_none
      assign pp[i] = '0;
    end
  end

  // ---- reduction stages -----------------------------------------------------
  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int R  = rcw_rows(W, s);
    localparam int NG = R / 3;
    localparam int RN = rcw_rows(W, s + 1);

    logic [C-1:0] rin  [MAXR];   // rows entering this stage
    logic [C-1:0] rout [MAXR];   // rows leaving it

    if (s == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_stage[s-1].rout;
    end

    for (genvar g = 0; g < NG; g++) begin : g_grp
      logic [C-1:0] r0, r1, r2;   // the group's three rows
      logic [C-1:0] srow, krow;   // its sum and carry rows
      logic [C-1:0] co;           // carry out of each column's adder

      assign r0 = rin[3*g];
      assign r1 = rin[3*g+1];
      assign r2 = rin[3*g+2];

      for (genvar c = 0; c < C; c++) begin : g_col
        localparam int OP  = rcw_op(W, s, g, c);
        localparam int OPL = rcw_op(W, s, g, c - 1);
        localparam bit V0  = rcw_valid(W, s, 3*g,   c);
        localparam bit V1  = rcw_valid(W, s, 3*g+1, c);

        if (OP == OP_FA) begin : g_fa
          full_adder u_fa (.a(r0[c]), .b(r1[c]), .ci(r2[c]), .s(srow[c]), .co(co[c]));
        end else if (OP == OP_HA) begin : g_ha
          half_adder u_ha (
            .a(V0 ? r0[c] : r1[c]), .b((V0 && V1) ? r1[c] : r2[c]),
            .h(srow[c]), .g(co[c])
          );
        end else if (OP == OP_NONE) begin : g_empty
          assign srow[c] = 1'b0;
          assign co[c]   = 1'b0;
        end else begin : g_pass
          assign srow[c] = V0 ? r0[c] : (V1 ? r1[c] : r2[c]);
          assign co[c]   = 1'b0;
        end

        if (OPL == OP_FA || OPL == OP_HA) begin : g_kcarry
          assign krow[c] = co[c-1];
        end else if (OP == OP_PASS2) begin : g_kpass
          assign krow[c] = (V0 && V1) ? r1[c] : r2[c];
        end else begin : g_kempty
          assign krow[c] = 1'b0;
        end
      end

      assign rout[2*g]   = srow;
      assign rout[2*g+1] = krow;
    end

    for (genvar j = 0; j < R % 3; j++) begin : g_left
      assign rout[2*NG+j] = rin[3*NG+j];
    end

    for (genvar r = RN; r < MAXR; r++) begin : g_unused
      assign rout[r] = '0;
    end
  end

  // ---- final addition ---------------------------------------------------------
  logic [C-1:0] last [MAXR];   // the two rows left after reduction
  logic         final_cout;

  if (NS == 0) begin : g_noreduce
    assign last = pp;
  end else begin : g_reduced
    assign last = g_stage[NS-1].rout;
  end

  mod_sqrt_csla #(.WIDTH(C)) u_final (
    .a(last[0]), .b(last[1]), .cin(1'b0),
    .sum(p), .cout(final_cout)
  );
endmodule
