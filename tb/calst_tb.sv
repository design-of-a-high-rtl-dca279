// Self-checking testbench of calst with stand-ins for its partners: a
// controller that becomes ready after 9 IncState pulses (8 measurements),
// a counter that is ready after 8 Measure cycles, and a store that answers
// 3 cycles after its start. Checks 8 store starts, exactly 8 Measure
// cycles per measurement, the DELAY-cycle wait (plus the check cycle) between IncState and the
// first Measure, and Ready2 at the end.
module calst_tb;
  localparam int DELAY = 5;
  logic clk = 0, rst, start2, ctrl_ready, cnt_ready, store_ready;
  logic incstate, cnt_clr, measure, store_start, ready2;
  int checks = 0, failures = 0;
  int n_inc, n_meas, n_store, cnt, sdel, t_inc, t_meas, cyc;

  calst #(.DELAY(DELAY)) dut (.clk, .rst, .start2, .ctrl_ready, .cnt_ready, .store_ready,
                              .incstate, .cnt_clr, .measure, .store_start, .ready2);

  always #5 clk = ~clk;

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  assign ctrl_ready = (n_inc >= 9);
  assign cnt_ready  = (cnt >= 8);
  always @(posedge clk) begin
    cyc++;
    store_ready <= 0;
    if (incstate) begin n_inc++; t_inc = cyc; end
    if (cnt_clr) cnt = 0;
    if (measure && !rst) begin
      if (cnt == 0) begin
        t_meas = cyc;
        chk("delay", t_meas - t_inc == DELAY + 2);
      end
      cnt++; n_meas++;
    end
    if (store_start) begin
      chk("8 measure cycles", cnt == 8);
      n_store++; sdel = 3;
    end else if (sdel > 0) begin
      sdel--;
      if (sdel == 0) store_ready <= 1;
    end
  end

  initial begin
    {n_inc, n_meas, n_store, cnt, sdel, cyc} = '0;
    rst = 1; start2 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    chk("idle", !incstate && !measure && !ready2);
    start2 = 1; @(negedge clk); start2 = 0;
    while (!ready2 && cyc < 2000) @(negedge clk);
    chk("ready2", ready2);
    chk("increments", n_inc == 9);
    chk("stores", n_store == 8);
    chk("measure cycles", n_meas == 64);
    if (n_meas != 64) $display("measure cycles %0d", n_meas);
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
