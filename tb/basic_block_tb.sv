// Self-checking testbench of the basic_block model with ideal parts
// (gain 2, no distortion or deviations), clocked like an even stage.
// Normal mode: for random inputs it checks, in the hold phase, the code
// (thresholds +-Amax/3) and the residue 2*(Vin - V_DAC), V_DAC = 0 or
// +-2/3*Amax; during the reset phase the output must be zero.
// Calibration mode: checks the four measurement points a, b, c, d, i.e.
// input -V_ADC or +V_ADC with forced codes 00/01 and 01/11.
// A 20 ns clock period is used so that the 2 ns reset phase can be probed
// in its middle with integer delays.
module basic_block_tb;
  localparam real AMAX = 0.8;
  logic clk1a, clk1b, clk2a, clk2b;
  real  vin_p, vin_n, vcm = 1.0, vout_p, vout_n, v, vd, exp_o;
  logic e1, e0, cal, c01, d1, d0;
  logic [1:0] exp_c;
  int checks = 0, failures = 0;

  tb_clkgen #(.TS(20)) u_clk (.clk1a, .clk1b, .clk2a, .clk2b);

  basic_block #(.GAIN(2.0), .A3(0.0)) dut (
    .vin_p, .vin_n, .vcm, .clka(clk1a), .clkb(clk1b), .e1, .e0, .cal, .c01,
    .d1, .d0, .vout_p, .vout_n
  );

  task automatic setv(real x);
    vin_p = vcm + x / 2; vin_n = vcm - x / 2;
  endtask

  task automatic chk(string what, logic [1:0] c, real o);
    real got;
    got = vout_p - vout_n;
    checks++;
    if ({d1, d0} != c || got - o > 1e-9 || o - got > 1e-9) begin
      failures++;
      $display("FAIL %s v=%f code=%b%b exp=%b out=%f exp=%f", what, v, d1, d0, c, got, o);
    end
  endtask

  initial begin
    cal = 0; c01 = 0; e1 = 0; e0 = 0;
    v = 0.0; setv(v);
    #2;
    for (int n = 0; n < 100; n++) begin
      v = (real'($urandom_range(2000)) - 1000.0) / 1000.0 * AMAX;
      setv(v);
      #20;                               // now 2 ns into the hold phase
      exp_c = (v > AMAX / 3) ? 2'b11 : (v > -AMAX / 3) ? 2'b01 : 2'b00;
      vd    = (exp_c == 2'b11) ? AMAX * 2 / 3 : (exp_c == 2'b00) ? -AMAX * 2 / 3 : 0.0;
      chk("normal", exp_c, 2.0 * (v - vd));
      #7;                                // middle of the reset phase
      checks++;
      if (vout_p != vout_n) begin failures++; $display("FAIL no reset"); end
      #13;
    end
    // calibration points: a (V_ADC1, 00), b (V_ADC1, 01), c (V_ADC2, 01), d (V_ADC2, 11)
    cal = 1;
    for (int k = 0; k < 4; k++) begin
      c01 = (k >= 2);
      {e1, e0} = (k == 0) ? 2'b00 : (k == 3) ? 2'b11 : 2'b01;
      v = 0.1; setv(v);                  // block input is ignored
      #20;
      case (k)
        0: exp_o = 2.0 * (-AMAX / 3 + AMAX * 2 / 3);
        1: exp_o = 2.0 * (-AMAX / 3);
        2: exp_o = 2.0 * (AMAX / 3);
        default: exp_o = 2.0 * (AMAX / 3 - AMAX * 2 / 3);
      endcase
      chk("calibration", {e1, e0}, exp_o);
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
