// sha: behavioural model of the switched-capacitor sample-and-hold
// amplifier of a basic block. Not synthesizable: voltages are real-valued.
//
// The differential plate voltages of the two capacitor pairs are combined
// with the capacitor weights (1+CMIS)/2 and (1-CMIS)/2. While Control1 is
// high the amplifier input is reset and the capacitors track their inputs;
// the falling edge of Control1 is the sample moment, where the combined
// input Vs is frozen. Afterwards, with the plates switched to the sub-DAC,
// the output settles to the static error model of the document:
//   x    = Vs - Vdac + Amax*VOFF          (volts)
//   Vout = GAIN*x - A3*x^3                 (A3 in 1/V^2)
// While Control1 or Control2 (output reset) is high the output is zero.
// Settling, noise and the memory effect are not modelled. GAIN = 1.8647
// and A3 = 0.033 are the closed-loop values the document reports for its
// transistor-level SHA; the offset is given relative to Amax as in the
// document's error model.
module sha #(
  parameter real AMAX = 0.8,
  parameter real GAIN = 1.8647,
  parameter real A3   = 0.033,
  parameter real VOFF = 0.0,
  parameter real CMIS = 0.0
) (
  input  real  c0p,
  input  real  c1p,
  input  real  c1n,
  input  real  c0n,
  input  real  vcm,
  input  logic control1,
  input  logic control2,
  output real  vout_p,
  output real  vout_n
);
  real veff, vs, u, vo;

  always_comb veff = 0.5 * (1.0 + CMIS) * (c0p - c0n) + 0.5 * (1.0 - CMIS) * (c1p - c1n);

  always_ff @(negedge control1) vs <= veff;

  always_comb begin
    u = vs - veff + AMAX * VOFF;
    if (control1 || control2) vo = 0.0;
    else                      vo = GAIN * u - A3 * u * u * u;
  end

  assign vout_p = vcm + 0.5 * vo;
  assign vout_n = vcm - 0.5 * vo;
endmodule
