// Self-checking testbench of the sub_adc model: sweeps the differential
// input with comparator deviations DEV1 = 0.02, DEV2 = -0.01 and checks the
// thermometer code against the two levels computed here; checks that the
// latch holds while nLatch is low, that eIE passes e1e0, and the
// reference outputs.
module sub_adc_tb;
  localparam real AMAX = 0.8;
  real  vin_p, vin_n, vcm, vref_p, vref_n, v, lo, hi;
  logic e1, e0, eie, nlatch, d1, d0;
  logic [1:0] exp_c;
  int checks = 0, failures = 0;

  sub_adc #(.DEV1(0.02), .DEV2(-0.01)) dut (
    .vin_p, .vin_n, .vcm, .e1, .e0, .eie, .nlatch, .d1, .d0, .vref_p, .vref_n
  );

  task automatic chk(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s v=%f d=%b%b", what, v, d1, d0); end
  endtask

  initial begin
    vcm = 1.0; eie = 0; e1 = 0; e0 = 0; nlatch = 1;
    lo = -AMAX * (1.0 / 3.0 - 0.02);
    hi =  AMAX * (1.0 / 3.0 - 0.01);
    for (int n = 0; n <= 200; n++) begin
      v = -0.8 + 1.6 * n / 200.0;
      vin_p = vcm + v / 2; vin_n = vcm - v / 2;
      #1;
      exp_c = (v > hi) ? 2'b11 : (v > lo) ? 2'b01 : 2'b00;
      chk("code", {d1, d0} == exp_c);
    end
    // latch: take 0.5 V, drop nLatch, move input, code must hold
    v = 0.5; vin_p = vcm + v / 2; vin_n = vcm - v / 2; #1;
    nlatch = 0; #1;
    v = -0.5; vin_p = vcm + v / 2; vin_n = vcm - v / 2; #1;
    chk("latched", {d1, d0} == 2'b11);
    nlatch = 1; #1;
    chk("transparent", {d1, d0} == 2'b00);
    // forced code
    eie = 1; {e1, e0} = 2'b01; #1;
    chk("forced 01", {d1, d0} == 2'b01);
    {e1, e0} = 2'b11; #1;
    chk("forced 11", {d1, d0} == 2'b11);
    chk("vref", (vref_p - vref_n) > 0.2666 && (vref_p - vref_n) < 0.2667 && (vref_p + vref_n) == 2.0);
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
