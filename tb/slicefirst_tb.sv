// Self-checking testbench of slicefirst: loads w0 and w2 serially and
// checks that Y, registered on the falling CLK edge, is w0, 0 or w2 for
// codes 00, 01, 11 (the partial-sum input is zero in the first cell).
module slicefirst_tb;
  logic               d0, d1, ce, sel, sda, sclk, rst, clk;
  logic signed [15:0] y, w0, w2, exp_y;
  int checks = 0, failures = 0;

  slicefirst dut (.d0, .d1, .ce, .sel, .sda, .sclk, .rst, .clk, .y);

  task automatic load(logic s, logic [15:0] w);
    sel = s;
    for (int b = 15; b >= 0; b--) begin
      sda = w[b]; #1 sclk = 1; #1 sclk = 0;
    end
  endtask

  initial begin
    {d0, d1, ce, sel, sda, sclk, clk} = '0;
    rst = 1; #1 rst = 0;
    for (int r = 0; r < 10; r++) begin
      w0 = 16'($urandom); w2 = 16'($urandom);
      ce = 1; load(0, w0); load(1, w2); ce = 0;
      for (int n = 0; n < 3; n++) begin
        case (n)
          0: {d1, d0} = 2'b00;
          1: {d1, d0} = 2'b01;
          default: {d1, d0} = 2'b11;
        endcase
        exp_y = (n == 0) ? w0 : (n == 1) ? 16'sd0 : w2;
        #1 clk = 1; #1 clk = 0; #1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL code=%b y=%0d exp=%0d", {d1, d0}, y, exp_y);
        end
      end
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
