// Self-checking testbench of the sha model (gain 1.9, A3 = 0.05, offset
// 0.01, no capacitor mismatch): samples random inputs, switches the plates
// to random DAC levels and compares the held output with
// G*x - A3*x^3, x = Vs - Vdac + Amax*offset, computed here; also
// checks the zero output during the sample and reset phases and that the
// sample moment is the falling edge of Control1.
module sha_tb;
  localparam real AMAX = 0.8, G = 1.9, A3 = 0.05, VO = 0.01;
  real c0p, c1p, c1n, c0n, vcm = 1.0, vout_p, vout_n, vs, vd, u, e, vo;
  logic control1, control2;
  int checks = 0, failures = 0;

  sha #(.GAIN(G), .A3(A3), .VOFF(VO)) dut (
    .c0p, .c1p, .c1n, .c0n, .vcm, .control1, .control2, .vout_p, .vout_n
  );

  task automatic plates(real v);
    c0p = vcm + v / 2; c1p = vcm + v / 2; c1n = vcm - v / 2; c0n = vcm - v / 2;
  endtask

  initial begin
    control2 = 0;
    for (int n = 0; n < 50; n++) begin
      vs = (real'($urandom_range(1000)) - 500.0) / 1000.0 * 0.8;
      vd = (real'($urandom_range(2)) - 1.0) * 0.8 * 2.0 / 3.0;
      control1 = 1; plates(vs); #1;
      checks++;
      if (vout_p != vout_n) begin failures++; $display("FAIL output not zero in sample phase"); end
      control1 = 0; #1;
      plates(vs + 0.3);               // input moves after the sample moment
      #1 plates(vd); #1;
      u  = vs - vd + AMAX * VO;
      e  = G * u - A3 * u * u * u;
      vo = vout_p - vout_n;
      checks++;
      if (vo - e > 1e-9 || e - vo > 1e-9) begin
        failures++; $display("FAIL vs=%f vd=%f out=%f exp=%f", vs, vd, vo, e);
      end
      control2 = 1; #1;
      checks++;
      if (vout_p != vout_n) begin failures++; $display("FAIL output not reset"); end
      control2 = 0;
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
