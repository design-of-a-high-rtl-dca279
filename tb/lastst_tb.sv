// Self-checking testbench of lastst: a model receiver records what is
// shifted out. Checks w0(15) = 0xFFFF after 16 bits, w2(15) = 0x0001 after
// one bit, that no other register is written, that Ready1 follows Start1
// after 2*16 + 3 clock edges, and that Ready1 holds until reset.
module lastst_tb;
  logic clk = 0, rst, start1, c01, sclk, sda, ready1;
  logic [3:0] csel;
  int checks = 0, failures = 0, cyc;

  lastst dut (.clk, .rst, .start1, .csel, .c01, .sclk, .sda, .ready1);
  tb_weight_rx rx (.clr(rst), .en(1'b1), .csel, .c01, .sclk, .sda);

  always #5 clk = ~clk;

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; start1 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    chk("no ready before start", !ready1 && !sclk);
    start1 = 1;
    cyc = 0;
    while (!ready1 && cyc < 100) begin @(negedge clk); cyc++; end
    chk("cycle count", cyc == 35);
    if (cyc != 35) $display("cycles %0d", cyc);
    chk("w0(15) = -1", rx.w[15][0] == 16'hFFFF && rx.nbits[15][0] == 16);
    chk("w2(15) = +1", rx.w[15][1] == 16'h0001 && rx.nbits[15][1] == 1);
    for (int i = 0; i < 15; i++) chk("others untouched", rx.nbits[i][0] == 0 && rx.nbits[i][1] == 0);
    start1 = 0;
    repeat (5) @(negedge clk);
    chk("ready1 held", ready1);
    rst = 1; @(negedge clk); rst = 0;
    chk("ready1 cleared", !ready1);
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
