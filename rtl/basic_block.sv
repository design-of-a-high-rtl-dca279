// basic_block: behavioural model of one 1.5-bit stage of the pipeline.
// Not synthesizable as a whole: the sub-ADC, sub-DAC, switches and SHA are
// analog and modelled with real-valued signals; only switch_logic inside
// is ordinary logic.
//
// Clocking (one sample period Ts): CLKA high is the sample phase, CLKA low
// the hold phase. CLKB falls shortly before the end of the sample phase:
// that is the sample moment, where the SHA freezes its input and the
// sub-ADC latches its code d1d0. CLKB rises again shortly before the end of
// the hold phase while CLKA is still low: that is the reset phase, where
// the capacitors go to Vcm and the output to zero. In the hold phase the
// output is GAIN*(Vin - V_DAC(d1d0)), the residue for the next stage, which
// samples it before the reset phase.
//
// Calibration: with Cal high the sub-ADC passes the forced code e1e0 and
// the switch matrix samples the sub-ADC reference -V_ADC (C01 = 0) or
// +V_ADC (C01 = 1) instead of the block input.
//
// Pins follow the basic-block description (supply pins left out). The
// mapping of CLKA/CLKB onto AnotD, RST, nLatch and the SHA controls is
// this design's reading of the clock timing diagram. The sub-ADC
// reference outputs are wired crossed to the matrix's Cin+/Cin- so that
// C01 = 0 selects -V_ADC, as the table of switch-matrix states asks.
module basic_block #(
  parameter real AMAX     = 0.8,
  parameter real GAIN     = 1.8647,
  parameter real A3       = 0.033,
  parameter real VOFF     = 0.0,
  parameter real CMIS     = 0.0,
  parameter real ADC_DEV1 = 0.0,
  parameter real ADC_DEV2 = 0.0,
  parameter real DAC_DEVP = 0.0,
  parameter real DAC_DEVN = 0.0
) (
  input  real  vin_p,
  input  real  vin_n,
  input  real  vcm,
  input  logic clka,
  input  logic clkb,
  input  logic e1,
  input  logic e0,
  input  logic cal,
  input  logic c01,
  output logic d1,
  output logic d0,
  output real  vout_p,
  output real  vout_n
);
  real        vref_p, vref_n, c0p, c1p, c1n, c0n;
  logic [3:0] s;
  logic [2:0] t;
  logic       u0, rst_ph;

  assign rst_ph = clkb & ~clka;

  sub_adc #(.AMAX(AMAX), .DEV1(ADC_DEV1), .DEV2(ADC_DEV2)) u_adc (
    .vin_p, .vin_n, .vcm, .e1, .e0, .eie(cal), .nlatch(clkb),
    .d1, .d0, .vref_p, .vref_n
  );

  switch_logic u_logic (
    .anotd(clka), .rst(rst_ph), .d1, .d0, .cal, .c01, .s, .t, .u0
  );

  switch_matrix #(.AMAX(AMAX), .DEVP(DAC_DEVP), .DEVN(DAC_DEVN)) u_matrix (
    .s, .t, .u0, .ain_p(vin_p), .ain_n(vin_n), .cin_p(vref_n), .cin_n(vref_p),
    .vcm, .c0p, .c1p, .c1n, .c0n
  );

  sha #(.AMAX(AMAX), .GAIN(GAIN), .A3(A3), .VOFF(VOFF), .CMIS(CMIS)) u_sha (
    .c0p, .c1p, .c1n, .c0n, .vcm, .control1(clkb), .control2(rst_ph), .vout_p, .vout_n
  );
endmodule
