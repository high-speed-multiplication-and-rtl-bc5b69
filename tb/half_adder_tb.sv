// half_adder_tb: exhaustive check that {g, h} equals a + b.
module half_adder_tb;
  logic a, b, h, g;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .h(h), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({g, h} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> g=%b h=%b", a, b, g, h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
