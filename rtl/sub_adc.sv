// sub_adc: behavioural model of the 1.5-bit sub-ADC of a basic block.
// This is not synthesizable logic: the comparators are analog and are
// modelled with real-valued signals.
//
// Two comparators compare the differential input Vin = Vin+ - Vin- with
// the levels V_ADC1 = -Amax*(R_ADC - DEV1) and V_ADC2 = Amax*(R_ADC + DEV2)
// and give the thermometer code c1c0 (00 below V_ADC1, 01 between, 11
// above). eIE selects c1c0 (normal operation) or the forced code e1e0
// (calibration). A latch passes the selected code to d1d0 while nLatch is
// high and holds it from the falling edge of nLatch. The nominal reference
// R_ADC*Amax is also driven out differentially on Vref+/Vref- around Vcm
// for calibration. Supply pins are left out.
//
// Port names, the mux and the latch follow the sub-ADC model of the
// analog appendix; the comparator deviations DEV1, DEV2 (in units of Amax)
// follow the error model of the basic block. Amax = 0.8 and R_ADC = 1/3
// are the document's design values.
module sub_adc #(
  parameter real AMAX = 0.8,
  parameter real RADC = 1.0 / 3.0,
  parameter real DEV1 = 0.0,
  parameter real DEV2 = 0.0
) (
  input  real  vin_p,
  input  real  vin_n,
  input  real  vcm,
  input  logic e1,
  input  logic e0,
  input  logic eie,
  input  logic nlatch,
  output logic d1,
  output logic d0,
  output real  vref_p,
  output real  vref_n
);
  real        vin;
  logic       c1, c0;
  logic [1:0] sel, held;

  always_comb begin
    vin = vin_p - vin_n;
    c1  = vin > AMAX * (RADC + DEV2);
    c0  = vin > -AMAX * (RADC - DEV1);
  end

  // transparent while nLatch is high, holds from its falling edge
  assign sel = eie ? {e1, e0} : {c1, c0};
  always_ff @(negedge nlatch) held <= sel;
  assign {d1, d0} = nlatch ? sel : held;

  assign vref_p = vcm + 0.5 * AMAX * RADC;
  assign vref_n = vcm - 0.5 * AMAX * RADC;
endmodule
