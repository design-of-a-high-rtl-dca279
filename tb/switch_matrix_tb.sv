// Self-checking testbench of the switch_matrix model: for every control
// word of the switch-matrix table it checks which of the distinct source
// voltages appears on C0+, C1+, C1-, C0-, with a sub-DAC of
// Vcm +- Amax*R_DAC/2 (no deviation), Vcm = 1.
module switch_matrix_tb;
  logic [3:0] s;
  logic [2:0] t;
  logic       u0;
  real ain_p = 1.31, ain_n = 0.77, cin_p = 1.13, cin_n = 0.87, vcm = 1.0;
  real c0p, c1p, c1n, c0n, vdp, vdn;
  int checks = 0, failures = 0;

  switch_matrix dut (.s, .t, .u0, .ain_p, .ain_n, .cin_p, .cin_n, .vcm, .c0p, .c1p, .c1n, .c0n);

  function automatic bit near(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  task automatic chk(string what, real a, real b, real c, real d);
    #1;
    checks++;
    if (!(near(c0p, a) && near(c1p, b) && near(c1n, c) && near(c0n, d))) begin
      failures++;
      $display("FAIL %s: %f %f %f %f", what, c0p, c1p, c1n, c0n);
    end
  endtask

  initial begin
    vdp = 1.0 + 0.8 / 3.0;
    vdn = 1.0 - 0.8 / 3.0;
    t = 0; u0 = 0;
    s = 4'b0011; chk("s0 s1", vdn, vdn, vdp, vdp);
    s = 4'b1001; chk("s0 s3", vdn, vdp, vdp, vdn);
    s = 4'b1100; chk("s2 s3", vdp, vdp, vdn, vdn);
    s = 0;
    t = 3'b001; chk("t0", ain_p, ain_p, ain_n, ain_n);
    t = 3'b010; chk("t1", cin_p, cin_p, cin_n, cin_n);
    t = 3'b100; chk("t2", cin_n, cin_n, cin_p, cin_p);
    t = 0; u0 = 1; chk("u0", vcm, vcm, vcm, vcm);
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
