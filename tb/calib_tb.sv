// Self-checking testbench of calib: two calibration runs. Checks the
// one-cycle Reset pulse, that Calib and BSY cover the whole run, that
// Start1 stays high until Ready1, that Start2 is one cycle, that a CAL
// level held high does not restart the machine, and the cycle count of a
// run with the Ready delays this testbench chooses (LastSt 5, CalSt 7).
module calib_tb;
  logic clk = 0, rst, cal, ready1, ready2;
  logic bsy, reset_o, calib_o, start1, start2;
  int checks = 0, failures = 0;
  int n_reset, n_start2, n_busy, cyc;

  calib dut (.clk, .rst, .cal, .ready1, .ready2, .bsy, .reset_o, .calib_o, .start1, .start2);

  always #5 clk = ~clk;

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // sub-function stand-ins
  int s1cnt, s2cnt;
  logic s2seen;
  always_ff @(posedge clk) begin
    if (reset_o || rst) begin
      s1cnt <= 0; ready1 <= 0; s2seen <= 0; s2cnt <= 0; ready2 <= 0;
    end else begin
      if (start1 && !ready1) begin
        s1cnt <= s1cnt + 1;
        if (s1cnt == 4) ready1 <= 1;
      end
      if (start2) s2seen <= 1;
      if (s2seen && !ready2) begin
        s2cnt <= s2cnt + 1;
        if (s2cnt == 6) ready2 <= 1;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (reset_o) n_reset++;
      if (start2) n_start2++;
      if (bsy) n_busy++;
      if (bsy && !reset_o) chk("calib during busy", calib_o);
      if (!bsy) chk("calib idle", !calib_o && !start1 && !start2);
      if (start1) chk("start1 before ready1", !ready1 || calib_o);
    end
  end

  initial begin
    rst = 1; cal = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    chk("idle bsy", !bsy);
    for (int run = 0; run < 2; run++) begin
      n_reset = 0; n_start2 = 0; n_busy = 0;
      @(negedge clk) cal = 1;
      @(negedge clk); @(negedge clk);
      if (run == 1) repeat (30) @(negedge clk);   // CAL held high
      cal = 0;
      cyc = 0;
      while (bsy && cyc < 200) begin @(negedge clk); cyc++; end
      repeat (5) @(negedge clk);
      chk("one reset pulse", n_reset == 1);
      chk("one start2 pulse", n_start2 == 1);
      // RESET 1 + LAST (start1 until ready1: 6) + START2 1 + WAIT2 until ready2 (8)
      chk("busy cycles", n_busy == 16);
      if (n_busy != 16) $display("busy cycles %0d", n_busy);
      chk("back to idle", !bsy && !calib_o);
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
