// mod_sqrt_csla_tb: checks the 16-bit square-root carry select adder against
// integer addition: directed carry-chain cases (a carry rippling through all
// groups, each group boundary) and 20000 random operand sets. A 13-bit
// instance checks that a width ending inside a group also adds correctly.
module mod_sqrt_csla_tb;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [12:0] s13;
  logic        cout13;

  mod_sqrt_csla dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  mod_sqrt_csla #(.WIDTH(13)) dut13 (
    .a(a[12:0]), .b(b[12:0]), .cin(cin), .sum(s13), .cout(cout13)
  );

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_, input logic tc);
    logic [16:0] exp;
    logic [13:0] exp13;
    a = ta; b = tb_; cin = tc;
    #1;
    exp   = 17'(ta) + 17'(tb_) + 17'(tc);
    exp13 = 14'(ta[12:0]) + 14'(tb_[12:0]) + 14'(tc);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %h + %h + %b -> %h exp %h", ta, tb_, tc, {cout, s}, exp);
    end
    checks++;
    if ({cout13, s13} !== exp13) begin
      failures++;
      if (failures < 20) $display("FAIL13 %h + %h + %b -> %h exp %h", ta[12:0], tb_[12:0], tc, {cout13, s13}, exp13);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hffff, 16'h0000, 1'b1);   // carry through every group
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h5555, 16'haaaa, 1'b1);
    // a carry generated at, and rippling up from, every bit position
    for (int k = 0; k < 16; k++) begin
      apply(16'(1) << k, 16'(1) << k, 1'b0);
      apply((16'(1) << k) - 16'd1, 16'd1, 1'b0);
      apply(~(16'(0)) >> k, 16'd0, 1'b1);
    end
    for (int n = 0; n < 20000; n++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
