// Self-checking testbench of counter at its default of 2^16
// sub-measurements: Measure is given with random gaps; Ready must rise
// exactly after the 65536th one, and Clear must restart the count.
module counter_tb;
  logic clk = 0, rst, clr, measure, ready;
  int checks = 0, failures = 0, n;

  counter dut (.clk, .rst, .clr, .measure, .ready);

  always #5 clk = ~clk;

  initial begin
    rst = 1; clr = 0; measure = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 2; run++) begin
      n = 0;
      clr = 1; @(negedge clk); clr = 0;
      while (!ready && n < 70000) begin
        measure = ($urandom_range(3) != 0);
        @(negedge clk);
        if (measure) n++;
        checks++;
        if (ready != (n >= 65536)) begin
          failures++; $display("FAIL ready=%b after %0d", ready, n);
        end
      end
      measure = 0;
      checks++;
      if (n != 65536) begin failures++; $display("FAIL count %0d", n); end
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
