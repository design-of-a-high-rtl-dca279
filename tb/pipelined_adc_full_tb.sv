// Full-size end-to-end testbench of pipelined_adc at its default
// parameters: 16 stages, 16-bit weights and 2^16 sub-measurements per
// measurement, so one calibration takes about 3.9 million measurement-clock
// cycles (about 40 ms of simulated time at 100 MHz).
// Apart from the full measurement length it runs the same sequence and
// checks as pipelined_adc_tb: calibrate, check the weights, convert a slow
// ramp over +-0.78 V and check monotonicity, straight-line deviation (in
// 12-bit LSB), latency, and that every mechanism was exercised.
module pipelined_adc_full_tb;
  import adc_pkg::*;
  localparam int  NSUB_TB = 16;
  localparam int  NRAMP   = 4000;
  localparam real MAX_INL = 1.0;     // in 12-bit LSB of the 1.6 V range
  localparam int  LAT     = 8;

  logic clk1a, clk1b, clk2a, clk2b, rst, cal, bsy;
  logic signed [WW-1:0] d;
  real  vin_p, vin_n, vcm = 1.0, v;
  int   checks = 0, failures = 0;
  int   n_last = 0, n_meas [4] = '{0, 0, 0, 0}, n_store0 = 0, n_store1 = 0;
  int   n_calmode = 0, n_conv = 0, n_redund = 0;
  logic signed [WW-1:0] w0 [NSTAGES], w2 [NSTAGES];
  real  vs [NRAMP + 64];
  int   ds [NRAMP + 64];
  int   p_vs = 0, p_ds = 0;
  bit   ramp = 0;

  tb_clkgen #(.TS(10)) u_clk (.clk1a, .clk1b, .clk2a, .clk2b);

  pipelined_adc dut (
    .vin_p, .vin_n, .vcm, .clk1a, .clk1b, .clk2a, .clk2b, .fpga_clk(clk2a),
    .rst, .cal, .bsy, .d
  );

  assign w0[0] = dut.u_corr.g_slice[0].g_first.u_cell.u_slice.w0;
  assign w2[0] = dut.u_corr.g_slice[0].g_first.u_cell.u_slice.w2;
  for (genvar i = 1; i < NSTAGES; i++) begin : g_w
    assign w0[i] = dut.u_corr.g_slice[i].g_other.u_cell.w0;
    assign w2[i] = dut.u_corr.g_slice[i].g_other.u_cell.w2;
  end

  // mechanism counters, on the measurement clock
  always @(posedge clk2a) begin
    if (dut.u_meas.u_lastst.ready1 && dut.u_meas.start1) n_last++;
    if (dut.u_meas.measure)
      case ({dut.c01, dut.e1, dut.e0})
        3'b001:  n_meas[0]++;           // b: V_ADC1, code 01
        3'b000:  n_meas[1]++;           // a: V_ADC1, code 00
        3'b101:  n_meas[2]++;           // c: V_ADC2, code 01
        3'b111:  n_meas[3]++;           // d: V_ADC2, code 11
        default: ;
      endcase
    if (dut.u_meas.store_start) begin
      if (dut.u_meas.m) n_store1++;
      else              n_store0++;
    end
    if (dut.cal_st != '0) n_calmode++;
  end

  // ramp bookkeeping: input at stage 0's sample moment, output on CLK2A
  always @(negedge clk1b) if (ramp) begin
    #1;
    vs[p_vs] = vin_p - vin_n;
    if ((dut.d1[0] != (vs[p_vs] > 0.8 / 3)) || (dut.d0[0] != (vs[p_vs] > -0.8 / 3))) n_redund++;
    p_vs++;
  end
  always @(posedge clk2a) if (ramp) begin
    ds[p_ds] = int'(d);
    p_ds++;
    n_conv++;
  end

  task automatic setv(real x);
    vin_p = vcm + x / 2; vin_n = vcm - x / 2;
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    real sx, sy, sxx, sxy, a, b, e, emax, r, lsb;
    int  n, span;
    rst = 1; cal = 0; setv(0.0);
    #105 rst = 0;
    #100 cal = 1;
    #100 cal = 0;
    check(bsy === 1'b1, "BSY not raised by CAL");
    wait (bsy === 1'b0);
    $display("calibration finished at %0t", $time);
    #100;

    // weights
    check(w0[NSTAGES-1] == -1 && w2[NSTAGES-1] == 1, "last stage weights");
    for (int i = 0; i < NSTAGES - 1; i++) begin
      $display("stage %2d  w0 %6d  w2 %6d", i, w0[i], w2[i]);
      check(w0[i] < 0 && w2[i] > 0, $sformatf("stage %0d weight signs", i));
      r = real'(w2[i] - w0[i]) / real'(w2[i+1] - w0[i+1]);
      check(r > 1.6 && r < 2.2, $sformatf("stage %0d weight ratio %f", i, r));
    end

    // ramp
    @(negedge clk1a);              // input changes 0.1 Ts into the period
    #1;
    ramp = 1;
    for (int k = 0; k < NRAMP + 32; k++) begin
      v = -0.78 + 1.56 * real'(k < NRAMP ? k : NRAMP - 1) / real'(NRAMP - 1);
      setv(v);
      #10;
    end
    ramp = 0;

    // straight-line fit of output sample n+LAT against input sample n
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0;
    for (int k = 0; k < NRAMP; k++) begin
      sx += vs[k]; sy += ds[k + LAT]; sxx += vs[k] * vs[k]; sxy += vs[k] * ds[k + LAT]; n++;
    end
    b = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    a = (sy - b * sx) / n;
    emax = 0;
    for (int k = 0; k < NRAMP; k++) begin
      e = ds[k + LAT] - (a + b * vs[k]);
      if (e > emax) emax = e;
      if (-e > emax) emax = -e;
      if (k > 0 && ds[k + LAT] < ds[k - 1 + LAT] - 1) begin
        checks++; failures++;
        $display("FAIL not monotonic at %0d: %0d -> %0d", k, ds[k - 1 + LAT], ds[k + LAT]);
      end
    end
    span = ds[NRAMP - 1 + LAT] - ds[LAT];
    lsb = b * 1.6 / 4096.0;
    $display("ramp: span %0d codes, gain %f codes/V, max deviation from line %f codes = %f 12-bit LSB",
             span, b, emax, emax / lsb);
    check(span > 3000, "output span too small");
    // latency: the ramp stops at input sample NRAMP-1, so the output must
    // still move into output sample NRAMP-1+LAT and stay constant afterwards
    check(ds[NRAMP - 2 + LAT] < ds[NRAMP - 1 + LAT] && ds[NRAMP - 1 + LAT] == ds[NRAMP + LAT],
          "pipeline latency");
    check(emax / lsb < MAX_INL, "deviation from straight line");

    $display("mechanisms: laststage=%0d meas b=%0d a=%0d c=%0d d=%0d store m0=%0d m1=%0d calmode=%0d conv=%0d redundancy=%0d",
             n_last, n_meas[0], n_meas[1], n_meas[2], n_meas[3], n_store0, n_store1,
             n_calmode, n_conv, n_redund);
    check(n_last > 0, "last stage never programmed");
    for (int k = 0; k < 4; k++) check(n_meas[k] == (NSTAGES - 1) * 2 ** NSUB_TB, $sformatf("measurement kind %0d count %0d", k, n_meas[k]));
    check(n_store0 == 2 * (NSTAGES - 1), "stores with m=0");
    check(n_store1 == 2 * (NSTAGES - 1), "stores with m=1");
    check(n_calmode > 0, "calibration mode never used");
    check(n_conv > 0, "no normal conversions");
    check(n_redund > 0, "redundancy never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
