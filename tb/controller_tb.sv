// Self-checking testbench of controller: steps through all 62 states with
// IncState pulses (with idle cycles in between, which must not advance the
// state) and compares Csel, C01, e1e0 and m with the measurement order
// b, a, c, d per stage from stage 14 down to stage 0; checks Ready only in
// state 61 and that further pulses keep it there.
module controller_tb;
  logic clk = 0, rst, incstate, c01, e1, e0, m, ready;
  logic [3:0] csel;
  int checks = 0, failures = 0;

  controller dut (.clk, .rst, .incstate, .csel, .c01, .e1, .e0, .m, .ready);

  always #5 clk = ~clk;

  task automatic chk(string what, logic c, int st);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s state %0d csel=%0d c01=%b e=%b%b m=%b rdy=%b", what, st, csel, c01, e1, e0, m, ready);
    end
  endtask

  initial begin
    rst = 1; incstate = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    chk("state 0", !ready && csel == 0 && !m, 0);
    for (int st = 1; st <= 63; st++) begin
      incstate = 1; @(negedge clk); incstate = 0;
      repeat (2) @(negedge clk);
      if (st <= 60) begin
        int stage, k;
        logic [1:0] e_exp;
        stage = 14 - (st - 1) / 4;
        k     = (st - 1) % 4;      // 0 b, 1 a, 2 c, 3 d
        e_exp = (k == 1) ? 2'b00 : (k == 3) ? 2'b11 : 2'b01;
        chk("csel", csel == 4'(stage), st);
        chk("c01", c01 == (k >= 2), st);
        chk("e1e0", {e1, e0} == e_exp, st);
        chk("m", m == (k == 1 || k == 3), st);
        chk("not ready", !ready, st);
      end else begin
        chk("ready", ready, st);
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
