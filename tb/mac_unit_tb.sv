// mac_unit_tb: checks acc_out = acc_in + x * c (mod 2^16) and the carry out of
// the accumulation adder, with directed corner cases (zero, largest operands,
// a sum that just fits, one that just overflows) and 20000 random sets.
module mac_unit_tb;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  logic [7:0]  x, c;
  logic [15:0] acc_in, acc_out;
  logic        acc_cout;

  mac_unit dut (.x(x), .c(c), .acc_in(acc_in), .acc_out(acc_out), .acc_cout(acc_cout));

  task automatic apply(input logic [7:0] tx, input logic [7:0] tc, input logic [15:0] ta);
    int exp;
    x = tx; c = tc; acc_in = ta;
    #1;
    exp = int'(ta) + int'(tx) * int'(tc);
    checks++;
    if ({acc_cout, acc_out} !== 17'(exp)) begin
      failures++;
      if (failures < 20) $display("FAIL %0d + %0d*%0d -> %0d exp %0d", ta, tx, tc, {acc_cout, acc_out}, exp);
    end
    if (exp > 65535) n_ovf++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(8'd0,   8'd0,   16'd0);
    apply(8'd255, 8'd255, 16'd0);
    apply(8'd255, 8'd255, 16'd510);     // 65025 + 510 = 65535, just fits
    apply(8'd255, 8'd255, 16'd511);     // just overflows
    apply(8'd1,   8'd1,   16'hffff);
    apply(8'd0,   8'd77,  16'h1234);
    for (int n = 0; n < 20000; n++)
      apply(8'($urandom), 8'($urandom), 16'($urandom));
    checks++;
    if (n_ovf == 0) begin
      failures++;
      $display("FAIL no overflow case applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
