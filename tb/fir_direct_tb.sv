// fir_direct_tb: end-to-end test of the direct-form FIR filter at its default
// size (8 taps, 8-bit samples and coefficients, 16-bit output).
//
// A behavioural model keeps its own copy of the last N_TAPS samples and forms
// y(n) = sum coef[k] * x(n-k) with integer arithmetic. Each cycle the inputs
// are set after the falling clock edge, the combinational output is compared
// with the model just before the rising edge, and the model shifts when en is
// high. Phases:
//   1. impulse response: a single 1 sample must bring out coef[k] exactly k
//      sample clocks later (delay-line latency), then zero;
//   2. small random samples and coefficients, where no sum overflows;
//   3. full-range random values, where the sum often exceeds 16 bits: y must
//      equal the sum modulo 2^16 and ovf must be high exactly then;
//   4. sample-enable low: the delay line must hold;
//   5. coefficients changed in mid-stream;
//   6. reset in mid-stream: the delay line must clear.
// Each mechanism is counted; one that never occurred counts as a failure.
module fir_direct_tb;
  localparam int N = 8;
  localparam int W = 8;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en;
  logic [W-1:0] x_in;
  logic [W-1:0] coef [N];
  logic [15:0] y;
  logic        ovf;

  int checks = 0, failures = 0;
  int hist [N];                    // model delay line, hist[k] = x(n-k), k >= 1
  int n_ovf = 0, n_noovf = 0, n_hold = 0, n_coefchg = 0, n_reset = 0, n_impulse = 0;

  fir_direct dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .coef(coef), .y(y), .ovf(ovf)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_sum();
    int s;
    s = int'(x_in) * int'(coef[0]);
    for (int k = 1; k < N; k++) s += hist[k] * int'(coef[k]);
    return s;
  endfunction

  // Compare the output with the model, then take one clock edge.
  task automatic step(input string phase);
    int s;
    #1;
    s = model_sum();
    checks++;
    if (y !== 16'(s) || ovf !== (s > 65535)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: y=%0d ovf=%b exp=%0d ovf=%b", phase, y, ovf, s % 65536, s > 65535);
    end
    if (s > 65535) n_ovf++; else n_noovf++;
    @(posedge clk);
    if (rst_n && en) begin
      for (int k = N - 1; k > 1; k--) hist[k] = hist[k-1];
      hist[1] = int'(x_in);
    end
    @(negedge clk);
  endtask

  task automatic model_reset();
    for (int k = 0; k < N; k++) hist[k] = 0;
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; x_in = '0;
    for (int k = 0; k < N; k++) coef[k] = '0;
    model_reset();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. impulse response
    for (int k = 0; k < N; k++) coef[k] = W'(3 + 7 * k);
    en = 1'b1;
    for (int n = 0; n < 2 * N; n++) begin
      x_in = (n == 0) ? W'(1) : W'(0);
      #1;
      checks++;
      if (y !== ((n < N) ? 16'(coef[n]) : 16'd0)) begin
        failures++;
        $display("FAIL impulse: sample %0d y=%0d exp=%0d", n, y, (n < N) ? coef[n] : 0);
      end else if (n < N) n_impulse++;
      step("impulse");
    end

    // 2. small values, no overflow possible
    for (int k = 0; k < N; k++) coef[k] = W'($urandom_range(31));
    for (int n = 0; n < 200; n++) begin
      x_in = W'($urandom_range(31));
      step("small");
    end

    // 3. full range, frequent overflow
    for (int blk = 0; blk < 20; blk++) begin
      for (int k = 0; k < N; k++) coef[k] = W'($urandom);
      for (int n = 0; n < 100; n++) begin
        x_in = W'($urandom);
        step("full");
      end
    end

    // 4. sample enable low: delay line holds
    for (int n = 0; n < 50; n++) begin
      en   = 1'($urandom_range(1));
      x_in = W'($urandom);
      if (!en) n_hold++;
      step("enable");
    end
    en = 1'b1;

    // 5. coefficients changed in mid-stream, every few samples
    for (int n = 0; n < 100; n++) begin
      if (n % 7 == 0) begin
        coef[$urandom_range(N - 1)] = W'($urandom);
        n_coefchg++;
      end
      x_in = W'($urandom);
      step("coef change");
    end

    // 6. reset in mid-stream
    for (int r = 0; r < 3; r++) begin
      for (int n = 0; n < 10; n++) begin
        x_in = W'($urandom);
        step("pre-reset");
      end
      rst_n = 1'b0;
      #1;
      model_reset();
      n_reset++;
      @(negedge clk);
      rst_n = 1'b1;
      x_in = W'($urandom);
      #1;
      checks++;
      if (y !== 16'(int'(x_in) * int'(coef[0]))) begin
        failures++;
        $display("FAIL reset: y=%0d exp=%0d", y, int'(x_in) * int'(coef[0]));
      end
      step("post-reset");
    end

    // every mechanism must have occurred
    checks++; if (n_impulse != N) begin failures++; $display("FAIL impulse taps seen %0d", n_impulse); end
    checks++; if (n_ovf     == 0) begin failures++; $display("FAIL no overflow occurred"); end
    checks++; if (n_noovf   == 0) begin failures++; $display("FAIL no in-range sum occurred"); end
    checks++; if (n_hold    == 0) begin failures++; $display("FAIL enable never low"); end
    checks++; if (n_coefchg == 0) begin failures++; $display("FAIL coefficients never changed"); end
    checks++; if (n_reset   == 0) begin failures++; $display("FAIL reset never applied"); end
    $display("mechanisms: impulse taps=%0d overflow=%0d in-range=%0d hold=%0d coef changes=%0d resets=%0d",
             n_impulse, n_ovf, n_noovf, n_hold, n_coefchg, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
