// rc_wallace_mult_tb: exhaustive check of the 8x8 reduced complexity Wallace
// multiplier (all 65536 operand pairs) against integer multiplication. Two
// smaller instances, 4x4 and 5x5 (each also exhaustive), exercise other row
// groupings of the reduction. It also checks the stage count of the 8x8
// reduction: rows 8 -> 6 -> 4 -> 3 -> 2, four stages.
module rc_wallace_mult_tb;
  import arith_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a, b;
  logic [15:0] p;
  logic [7:0]  p4;
  logic [9:0]  p5;

  rc_wallace_mult          dut  (.a(a), .b(b), .p(p));
  rc_wallace_mult #(.W(4)) dut4 (.a(a[3:0]), .b(b[3:0]), .p(p4));
  rc_wallace_mult #(.W(5)) dut5 (.a(a[4:0]), .b(b[4:0]), .p(p5));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, a, b, got, exp);
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
    check("stages", rcw_stages(8), 4);
    check("rows1", rcw_rows(8, 1), 6);
    check("rows2", rcw_rows(8, 2), 4);
    check("rows3", rcw_rows(8, 3), 3);
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      check("8x8", int'(p), int'(a) * int'(b));
      check("4x4", int'(p4), int'(a[3:0]) * int'(b[3:0]));
      check("5x5", int'(p5), int'(a[4:0]) * int'(b[4:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
