// rca2_tb: exhaustive check of the 2-bit ripple carry adder over all 32
// combinations of a, b and cin.
module rca2_tb;
  logic [1:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  rca2 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, cin} = 5'(v);
      #1;
      checks++;
      if ({cout, sum} !== 3'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
