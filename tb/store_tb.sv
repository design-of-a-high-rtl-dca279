// Self-checking testbench of store: with m = 0 Ready must come one cycle
// after the start without any SCLK pulse; with m = 1 a model receiver must
// get the weight MSB first in 16 SCLK pulses, with Ready one cycle after
// the 32 bit cycles (33 cycles after the start).
module store_tb;
  logic clk = 0, rst, start, m, sclk, sda, ready;
  logic signed [15:0] weight;
  logic [15:0] rx;
  int nclk, cyc;
  int checks = 0, failures = 0;

  store dut (.clk, .rst, .start, .m, .weight, .sclk, .sda, .ready);

  always #5 clk = ~clk;
  always @(posedge sclk) begin rx = {rx[14:0], sda}; nclk++; end

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cyc %0d, nclk %0d, rx %h, w %h)", what, cyc, nclk, rx, weight); end
  endtask

  initial begin
    rst = 1; start = 0; m = 0; weight = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 20; r++) begin
      m = r[0];
      weight = 16'($urandom);
      rx = 0; nclk = 0; cyc = 0;
      start = 1; @(negedge clk); start = 0;
      weight = ~weight;                     // must have been captured
      while (!ready && cyc < 100) begin @(negedge clk); cyc++; end
      weight = ~weight;
      if (m) begin
        chk("bits", nclk == 16);
        chk("value", rx == weight);
        chk("cycles", cyc == 32);
      end else begin
        chk("no bits", nclk == 0);
        chk("cycles", cyc == 0);
      end
      @(negedge clk);
      chk("ready pulse", !ready);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
