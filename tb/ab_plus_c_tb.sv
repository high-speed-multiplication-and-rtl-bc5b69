// ab_plus_c_tb: exhaustive check of the ab+c carry cell against (a & b) | c
// over all eight input combinations.
module ab_plus_c_tb;
  logic a, b, c, x;
  int checks = 0, failures = 0;

  ab_plus_c dut (.a(a), .b(b), .c(c), .x(x));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      // truth table: x is 1 when c is 1, or when a and b are both 1
      if (x !== ((v == 3'b110) || (v == 3'b111) || (v[0] == 1'b1))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b x=%b", a, b, c, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
