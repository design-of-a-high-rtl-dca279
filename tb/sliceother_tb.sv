// Self-checking testbench of sliceother: loads random weights w0 and w2
// MSB first through SCLK/SDA, checks that CE low or the other SEL leaves a
// weight alone, then checks Y = X + w(code) one falling CLK edge later for
// random X and codes, and that RST clears weights and Y.
module sliceother_tb;
  logic               d0, d1, ce, sel, sda, sclk, rst, clk;
  logic signed [15:0] x, y, w0, w2, exp_y;
  int checks = 0, failures = 0;

  sliceother dut (.d0, .d1, .x, .ce, .sel, .sda, .sclk, .rst, .clk, .y);

  task automatic load(logic s, logic [15:0] w);
    sel = s;
    for (int b = 15; b >= 0; b--) begin
      sda = w[b]; #1 sclk = 1; #1 sclk = 0;
    end
  endtask

  task automatic check(string what, logic signed [15:0] got, logic signed [15:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, e);
    end
  endtask

  initial begin
    {d0, d1, ce, sel, sda, sclk, clk} = '0;
    x = '0;
    rst = 1; #1 rst = 0;
    w0 = 16'($urandom); w2 = 16'($urandom);
    ce = 1;
    load(0, w0);
    load(1, w2);
    ce = 0;
    load(0, 16'h1234);          // ignored: CE low
    for (int n = 0; n < 100; n++) begin
      x = 16'($urandom);
      case (n % 3)
        0: {d1, d0} = 2'b00;
        1: {d1, d0} = 2'b01;
        default: {d1, d0} = 2'b11;
      endcase
      exp_y = x + ((n % 3 == 0) ? w0 : (n % 3 == 1) ? 16'sd0 : w2);
      #1 clk = 1;
      #1 check("y before falling edge", y, (n == 0) ? 16'sd0 : y);
      clk = 0;
      #1 check("y", y, exp_y);
    end
    rst = 1; #1 rst = 0;
    check("reset y", y, 0);
    {d1, d0} = 2'b00; x = 0;
    #1 clk = 1; #1 clk = 0; #1;
    check("reset w0", y, 0);
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
