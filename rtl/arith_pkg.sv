// arith_pkg: elaboration-time helpers shared by the adders and the multiplier.
//
// Square-root carry select adder partitioning: bits [1:0] are a 2-bit ripple
// carry adder, then carry-select groups of 2, 3, 4, 5, ... bits follow, so a
// 16-bit adder is split as [1:0] [3:2] [6:4] [10:7] [15:11]. The last group is
// cut short when the width does not end on a group boundary.
//
// Reduced complexity Wallace reduction: in every stage the rows of the
// partial-product matrix are split into groups of three. In each column of a
// group, three bits go into a full adder (sum to the group's sum row, carry to
// the next column of its carry row); one or two bits move to the next stage
// unchanged. A half adder is used only where two bits meet a column whose
// carry-row slot is already taken by the carry from the column below. Rows
// left over after grouping pass unchanged. The functions below replay that
// rule on valid-bit masks, so the multiplier's generate loops can size and
// wire every stage.
package arith_pkg;

  // ---- SQRT CSLA partitioning -------------------------------------------
  // Group 0 is the RCA on bits [1:0]; group g >= 1 has g+1 bits.
  function automatic int csla_lo(input int g);
    int lo;
    lo = 0;
    for (int j = 0; j < g; j++) lo += (j == 0) ? 2 : j + 1;
    return lo;
  endfunction

  function automatic int csla_ngroups(input int width);
    int g;
    g = 0;
    while (csla_lo(g) < width) g++;
    return g;
  endfunction

  function automatic int csla_size(input int g, input int width);
    int sz;
    sz = (g == 0) ? 2 : g + 1;
    if (csla_lo(g) + sz > width) sz = width - csla_lo(g);
    return sz;
  endfunction

  // ---- Reduced complexity Wallace reduction --------------------------------
  localparam int MAX_COLS = 128;
  localparam int MAX_ROWS = 64;

  // Operation applied to one column of a group of three rows.
  localparam int OP_NONE  = 0;  // no bit: nothing
  localparam int OP_PASS1 = 1;  // one bit: moved to the sum row
  localparam int OP_PASS2 = 2;  // two bits: moved to the sum and carry rows
  localparam int OP_HA    = 3;  // two bits, carry row slot taken: half adder
  localparam int OP_FA    = 4;  // three bits: full adder

  typedef logic [MAX_COLS-1:0]   colmask_t;
  typedef logic [3*MAX_COLS-1:0] opvec_t;
  typedef logic [MAX_ROWS-1:0][MAX_COLS-1:0] maskset_t;

  // Number of rows at the input of stage s: every group of three rows
  // becomes two, the one or two rows left over pass unchanged.
  function automatic int rcw_rows(input int w, input int s);
    int r;
    r = w;
    for (int st = 0; st < s; st++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  // Stages needed to bring the matrix down to two rows.
  function automatic int rcw_stages(input int w);
    int s;
    s = 0;
    while (rcw_rows(w, s) > 2) s++;
    return s;
  endfunction

  // Column operations of one group, from the valid-bit masks of its rows.
  // A column's carry-row slot is taken when the column below it used an adder.
  function automatic opvec_t rcw_group_ops(input colmask_t m0, input colmask_t m1,
                                           input colmask_t m2, input int ncols);
    opvec_t ops;
    logic   taken;
    int     n, op;
    ops   = '0;
    taken = 1'b0;
    for (int c = 0; c < ncols; c++) begin
      n = int'(m0[c]) + int'(m1[c]) + int'(m2[c]);
      case (n)
        3:       op = OP_FA;
        2:       op = taken ? OP_HA : OP_PASS2;
        1:       op = OP_PASS1;
        default: op = OP_NONE;
      endcase
      ops[3*c +: 3] = 3'(op);
      taken = (op == OP_FA || op == OP_HA);
    end
    return ops;
  endfunction

  // Valid-bit mask of row r at the input of stage s. Stage 0 is the
  // triangular AND-gate matrix: row i holds bits i .. i+w-1.
  function automatic colmask_t rcw_mask(input int w, input int s, input int r);
    maskset_t m, mn;
    colmask_t ms, mk, one;
    opvec_t   ops;
    int       rows, ng, op;
    one = colmask_t'(1);
    m   = '0;
    for (int i = 0; i < w; i++) m[i] = ((one << w) - one) << i;
    rows = w;
    for (int st = 0; st < s; st++) begin
      ng = rows / 3;
      mn = '0;
      for (int g = 0; g < ng; g++) begin
        ops = rcw_group_ops(m[3*g], m[3*g+1], m[3*g+2], 2 * w);
        ms  = '0;
        mk  = '0;
        for (int c = 0; c < 2 * w; c++) begin
          op = int'(ops[3*c +: 3]);
          if (op != OP_NONE)  ms = ms | (one << c);
          if (op == OP_PASS2) mk = mk | (one << c);
          if ((op == OP_FA || op == OP_HA) && c + 1 < 2 * w) mk = mk | (one << (c + 1));
        end
        mn[2*g]   = ms;
        mn[2*g+1] = mk;
      end
      for (int j = 0; j < rows % 3; j++) mn[2*ng+j] = m[3*ng+j];
      rows = 2 * ng + rows % 3;
      m    = mn;
    end
    return m[r];
  endfunction

  // Whether row r holds a bit in column c at the input of stage s.
  function automatic bit rcw_valid(input int w, input int s, input int r, input int c);
    colmask_t m;
    m = rcw_mask(w, s, r);
    return bit'(m >> c);
  endfunction

  // Operation on column c of group g (rows 3g .. 3g+2) in stage s.
  function automatic int rcw_op(input int w, input int s, input int g, input int c);
    opvec_t   ops;
    colmask_t m0, m1, m2;
    if (c < 0) return OP_NONE;
    m0  = rcw_mask(w, s, 3*g);
    m1  = rcw_mask(w, s, 3*g+1);
    m2  = rcw_mask(w, s, 3*g+2);
    ops = rcw_group_ops(m0, m1, m2, 2 * w);
    return int'(ops[3*c +: 3]);
  endfunction

endpackage
