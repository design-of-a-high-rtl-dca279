// Self-checking testbench of the analog_pipeline model.
// 1. The document's worked example: 10 ideal stages, Amax = 1.5 V,
//    input 0.4 V must give the stage codes 1 2 1 0 1 2 1 0 1 2.
// 2. 16 ideal stages (gain 2, Amax 0.8): for random held inputs the codes
//    D_i must reconstruct the input as R_DAC*Amax*sum 2^-i (D_i - 1) to
//    within Amax*2^-15.
// 3. 16 stages at the default deviations: every residue stays inside
//    +-Amax, which is what the 1.5-bit redundancy has to guarantee.
// Codes are read while each stage holds: stages 0,2,.. at 0.1 Ts after
// the period start, stages 1,3,.. at 0.6 Ts (see tb_clkgen).
module analog_pipeline_tb;
  logic clk1a, clk1b, clk2a, clk2b;
  real  va_p, va_n, vb_p, vb_n, vcm = 1.0, oa_p, oa_n, ob_p, ob_n, oc_p, oc_n, v, veq;
  logic [9:0]  a1, a0;
  logic [15:0] b1, b0, c1, c0;
  int   ca [10], cb [16];
  int checks = 0, failures = 0;
  real  maxres = 0.0;

  tb_clkgen #(.TS(10)) u_clk (.clk1a, .clk1b, .clk2a, .clk2b);

  analog_pipeline #(.N(10), .AMAX(1.5), .GAIN(2.0), .A3(0.0), .SIGMA_ADC(0.0),
                    .SIGMA_DAC(0.0), .SIGMA_OFF(0.0), .SIGMA_A(0.0)) u_a (
    .vin_p(va_p), .vin_n(va_n), .vcm, .clk1a, .clk1b, .clk2a, .clk2b,
    .cal('0), .e1(1'b0), .e0(1'b0), .c01(1'b0), .d1(a1), .d0(a0), .vout_p(oa_p), .vout_n(oa_n)
  );

  analog_pipeline #(.GAIN(2.0), .A3(0.0), .SIGMA_ADC(0.0), .SIGMA_DAC(0.0),
                    .SIGMA_OFF(0.0), .SIGMA_A(0.0)) u_b (
    .vin_p(vb_p), .vin_n(vb_n), .vcm, .clk1a, .clk1b, .clk2a, .clk2b,
    .cal('0), .e1(1'b0), .e0(1'b0), .c01(1'b0), .d1(b1), .d0(b0), .vout_p(ob_p), .vout_n(ob_n)
  );

  analog_pipeline u_c (
    .vin_p(vb_p), .vin_n(vb_n), .vcm, .clk1a, .clk1b, .clk2a, .clk2b,
    .cal('0), .e1(1'b0), .e0(1'b0), .c01(1'b0), .d1(c1), .d0(c0), .vout_p(oc_p), .vout_n(oc_n)
  );

  function automatic int dec(logic x1, logic x0);
    return x1 ? 2 : x0 ? 1 : 0;
  endfunction

  // largest residue of the deviating pipeline, sampled in every hold phase
  // of the last stage once the pipeline has filled
  always @(negedge clk2b) begin
    #4;
    if ($time > 200)
    if (oc_p - oc_n > maxres) maxres = oc_p - oc_n;
    if ($time > 200 && oc_n - oc_p > maxres) maxres = oc_n - oc_p;
  end

  initial begin
    va_p = vcm + 0.2; va_n = vcm - 0.2;
    for (int n = 0; n < 40; n++) begin
      v = (real'($urandom_range(2000)) - 1000.0) / 1000.0 * 0.8;
      vb_p = vcm + v / 2; vb_n = vcm - v / 2;
      #110;                      // 11 periods, now at a period start + 0
      #1;
      for (int i = 0; i < 16; i += 2) cb[i] = dec(b1[i], b0[i]);
      for (int i = 0; i < 10; i += 2) ca[i] = dec(a1[i], a0[i]);
      #5;
      for (int i = 1; i < 16; i += 2) cb[i] = dec(b1[i], b0[i]);
      for (int i = 1; i < 10; i += 2) ca[i] = dec(a1[i], a0[i]);
      #4;
      veq = 0.0;
      for (int i = 0; i < 16; i++) veq += 0.8 * 2.0 / 3.0 * (cb[i] - 1) / real'(2 ** i);
      checks++;
      if (veq - v > 0.8 / 32768.0 || v - veq > 0.8 / 32768.0) begin
        failures++; $display("FAIL reconstruct v=%f veq=%f", v, veq);
      end
      if (n == 0) begin
        int expa [10] = '{1, 2, 1, 0, 1, 2, 1, 0, 1, 2};
        for (int i = 0; i < 10; i++) begin
          checks++;
          if (ca[i] != expa[i]) begin failures++; $display("FAIL example stage %0d code %0d", i, ca[i]); end
        end
      end
    end
    checks++;
    if (maxres > 0.8 || maxres < 0.3) begin failures++; $display("FAIL residue range %f", maxres); end
    $display("largest residue %f V", maxres);
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
