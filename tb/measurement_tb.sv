// Self-checking testbench of the measurement algorithm (reduced to 2^3
// sub-measurements and a 4-cycle delay). A model converter returns, for
// the stage selected by Csel and the set-up given by C01 and e1e0, a
// random level chosen here per stage and measurement, plus +-1 that
// alternates every cycle (it averages out over 8 samples). A model
// receiver records the serial writes. After one CAL pulse the testbench
// checks that stage 15 holds -1/+1, that every other stage i holds
// w0 = b - a and w2 = c - d of its own levels, that each register was
// written with 16 bits, that Reset pulsed once and that BSY fell.
module measurement_tb;
  logic clk = 0, rst, cal, bsy, reset_o, calib_o, c01, e1, e0, sclk, sda;
  logic [3:0] csel;
  logic signed [15:0] d;
  int lvl [16][4];
  int checks = 0, failures = 0, n_reset = 0, cyc = 0;
  logic noise = 0;

  measurement #(.NSUB(3), .DELAY(4)) dut (
    .clk, .rst, .cal, .bsy, .reset_o, .calib_o, .csel, .c01, .e1, .e0, .sclk, .sda, .d
  );
  tb_weight_rx rx (.clr(reset_o), .en(calib_o), .csel, .c01, .sclk, .sda);

  always #5 clk = ~clk;

  // model converter: set-up -> level (b:0 a:1 c:2 d:3)
  always @(posedge clk) begin
    int k;
    k = !c01 ? (e0 ? 0 : 1) : (e1 ? 3 : 2);
    noise <= ~noise;
    d <= 16'(lvl[csel][k] + (noise ? 1 : -1));
    if (reset_o) n_reset++;
    cyc++;
  end

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 4; k++) lvl[i][k] = $signed($urandom_range(6000)) - 3000;
    rst = 1; cal = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk) cal = 1;
    @(negedge clk) cal = 0;
    @(negedge clk);
    chk("busy", bsy);
    while (bsy && cyc < 100000) @(negedge clk);
    chk("finished", !bsy && !calib_o);
    chk("one reset", n_reset == 1);
    chk("w0(15)", rx.w[15][0] == 16'hFFFF);
    chk("w2(15)", rx.w[15][1] == 16'h0001);
    for (int i = 0; i < 15; i++) begin
      chk("w0", rx.w[i][0] == 16'(lvl[i][0] - lvl[i][1]) && rx.nbits[i][0] == 16);
      chk("w2", rx.w[i][1] == 16'(lvl[i][2] - lvl[i][3]) && rx.nbits[i][1] == 16);
      if (rx.w[i][0] != 16'(lvl[i][0] - lvl[i][1]))
        $display("  stage %0d w0 %0d exp %0d", i, $signed(rx.w[i][0]), lvl[i][0] - lvl[i][1]);
    end
    $display("calibration took %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
