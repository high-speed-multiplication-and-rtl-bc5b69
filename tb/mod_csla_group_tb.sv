// mod_csla_group_tb: exhaustive check of the modified carry select group at
// the four widths the 16-bit adder uses (2, 3, 4 and 5 bits; 4 is the
// default). All 2048 combinations of 5-bit a, b and cin are applied; each
// width sees its low bits, so every combination of each width is covered.
module mod_csla_group_tb;
  int checks = 0, failures = 0;

  logic [4:0] a, b;
  logic       cin;

  logic [1:0] s2; logic co2;
  logic [2:0] s3; logic co3;
  logic [3:0] s4; logic co4;
  logic [4:0] s5; logic co5;

  mod_csla_group #(.W(2)) dut2 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(s2), .cout(co2));
  mod_csla_group #(.W(3)) dut3 (.a(a[2:0]), .b(b[2:0]), .cin(cin), .sum(s3), .cout(co3));
  mod_csla_group          dut4 (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s4), .cout(co4));
  mod_csla_group #(.W(5)) dut5 (.a(a[4:0]), .b(b[4:0]), .cin(cin), .sum(s5), .cout(co5));

  task automatic check(input int w, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL W=%0d a=%0d b=%0d cin=%0d got=%0d exp=%0d", w, a, b, cin, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {a, b, cin} = 11'(v);
      #1;
      check(2, int'({co2, s2}), int'(a[1:0]) + int'(b[1:0]) + int'(cin));
      check(3, int'({co3, s3}), int'(a[2:0]) + int'(b[2:0]) + int'(cin));
      check(4, int'({co4, s4}), int'(a[3:0]) + int'(b[3:0]) + int'(cin));
      check(5, int'({co5, s5}), int'(a) + int'(b) + int'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
