// Self-checking testbench of result at its default size (32-bit S,
// 2^16 sub-measurements). For three weights it adds 65536 random samples
// around a mean "b" with m = 0, subtracts 65536 samples around "a" with
// m = 1, and compares the weight output with floor((sum b - sum a)/2^16)
// computed here in 64 bits. Between weights m falls, which must clear S;
// idle cycles (Measure low) must not change S.
module result_tb;
  logic clk = 0, rst, m, measure;
  logic signed [15:0] d, weight;
  longint acc;
  int checks = 0, failures = 0;

  result dut (.clk, .rst, .m, .measure, .d, .weight);

  always #5 clk = ~clk;

  task automatic run(logic mm, int mean);
    m = mm;
    @(negedge clk);                 // m transition seen
    for (int n = 0; n < 65536; n++) begin
      measure = 1;
      d = 16'(mean + $signed($urandom_range(64)) - 32);
      if (mm) acc -= longint'(d); else acc += longint'(d);
      @(negedge clk);
      if (n % 1000 == 0) begin measure = 0; @(negedge clk); end
    end
    measure = 0;
  endtask

  initial begin
    rst = 1; m = 0; measure = 0; d = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 3; r++) begin
      int b, a;
      b = $signed($urandom_range(20000)) - 10000;
      a = $signed($urandom_range(20000)) - 10000;
      acc = 0;
      run(0, b);
      run(1, a);
      @(negedge clk);
      checks++;
      if (weight != 16'(acc >>> 16)) begin
        failures++;
        $display("FAIL weight=%0d exp=%0d", weight, acc >>> 16);
      end
      m = 0;                          // falling m clears S
      @(negedge clk); @(negedge clk);
      checks++;
      if (dut.s != 0) begin failures++; $display("FAIL S not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
