// switch_matrix: behavioural model of the sub-DAC and the switches that
// drive the four sampling capacitors of the SHA. Not synthesizable: the
// node voltages are real-valued.
//
// The sub-DAC makes two levels Vdac+ = Vcm + Amax*(R_DAC/2 + DEVP) and
// Vdac- = Vcm - Amax*(R_DAC/2 + DEVN). The switch controls from
// switch_logic connect the capacitor plates C0+, C1+, C1-, C0- to:
//   s0 s1  : Vdac-, Vdac-, Vdac+, Vdac+   (code 00, level -V_DAC)
//   s0 s3  : Vdac-, Vdac+, Vdac+, Vdac-   (code 01, level 0: each pair
//            sees one terminal on both plates)
//   s2 s3  : Vdac+, Vdac+, Vdac-, Vdac-   (code 11, level +V_DAC)
//   t0     : Ain+,  Ain+,  Ain-,  Ain-    (sample the block input)
//   t1     : Cin+,  Cin+,  Cin-,  Cin-    (calibration reference)
//   t2     : Cin-,  Cin-,  Cin+,  Cin+    (calibration reference, inverted)
//   u0     : Vcm on all four               (reset)
// With no switch closed the plates are modelled at Vcm. The table is the
// switch-matrix table of the analog appendix; the sub-DAC deviation
// parameters are this model's way of giving its three levels errors.
module switch_matrix #(
  parameter real AMAX = 0.8,
  parameter real RDAC = 2.0 / 3.0,
  parameter real DEVP = 0.0,
  parameter real DEVN = 0.0
) (
  input  logic [3:0] s,
  input  logic [2:0] t,
  input  logic       u0,
  input  real        ain_p,
  input  real        ain_n,
  input  real        cin_p,
  input  real        cin_n,
  input  real        vcm,
  output real        c0p,
  output real        c1p,
  output real        c1n,
  output real        c0n
);
  real vdac_p, vdac_n;

  always_comb begin
    vdac_p = vcm + AMAX * (0.5 * RDAC + DEVP);
    vdac_n = vcm - AMAX * (0.5 * RDAC + DEVN);
    c0p = vcm; c1p = vcm; c1n = vcm; c0n = vcm;
    if (t[0]) begin
      c0p = ain_p; c1p = ain_p; c1n = ain_n; c0n = ain_n;
    end else if (t[1]) begin
      c0p = cin_p; c1p = cin_p; c1n = cin_n; c0n = cin_n;
    end else if (t[2]) begin
      c0p = cin_n; c1p = cin_n; c1n = cin_p; c0n = cin_p;
    end else if (!u0) begin
      unique case (s)
        4'b0011: begin c0p = vdac_n; c1p = vdac_n; c1n = vdac_p; c0n = vdac_p; end // s0 s1
        4'b1001: begin c0p = vdac_n; c1p = vdac_p; c1n = vdac_p; c0n = vdac_n; end // s0 s3
        4'b1100: begin c0p = vdac_p; c1p = vdac_p; c1n = vdac_n; c0n = vdac_n; end // s2 s3
        default: ;
      endcase
    end
  end
endmodule
