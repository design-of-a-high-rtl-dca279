// analog_pipeline: behavioural model of the chain of N identical basic
// blocks. Not synthesizable: the analog signals are real-valued.
//
// Stage 0 takes the held input of the converter; every stage passes its
// residue to the next. Stages 0, 2, 4, ... run on CLK1A/CLK1B, stages
// 1, 3, 5, ... on CLK2A/CLK2B, which are the same waveforms delayed by
// half a sample period, so one stage holds while its successor samples and
// a sample reaches stage i after i/2 sample periods. Stage i delivers its
// code on d1[i]d0[i] and enters calibration mode when cal[i] is high; e1,
// e0 and C01 are shared by all stages.
//
// Each stage gets static deviations, drawn once from SEED with a fixed
// pseudo-random generator (an approximate normal variable from the sum of
// twelve uniform numbers), with the standard deviations of the document's
// design example for a converter with post-correction:
// sigma_ADC = 0.03, sigma_DAC = 0.01, sigma_off = 0.01, sigma_A = 0.01
// (all relative to Amax or to the gain). The gain deviation scales GAIN,
// the DAC deviation is applied to both sub-DAC terminals and to the
// capacitor match. N = 16 stages is the document's choice; the generator is
// this model's.
module analog_pipeline #(
  parameter int  N         = 16,
  parameter real AMAX      = 0.8,
  parameter real GAIN      = 1.8647,
  parameter real A3        = 0.033,
  parameter real SIGMA_ADC = 0.03,
  parameter real SIGMA_DAC = 0.01,
  parameter real SIGMA_OFF = 0.01,
  parameter real SIGMA_A   = 0.01,
  parameter int  SEED      = 1
) (
  input  real          vin_p,
  input  real          vin_n,
  input  real          vcm,
  input  logic         clk1a,
  input  logic         clk1b,
  input  logic         clk2a,
  input  logic         clk2b,
  input  logic [N-1:0] cal,
  input  logic         e1,
  input  logic         e0,
  input  logic         c01,
  output logic [N-1:0] d1,
  output logic [N-1:0] d0,
  output real          vout_p,
  output real          vout_n
);
  // approximately N(0,1) value number k of stage i
  function automatic real gauss(int unsigned i, int unsigned k);
    int unsigned x;
    real         acc;
    x   = (int'(SEED) * 32'd747796405 + i * 32'd2891336453 + k * 32'd277803737) | 1;
    acc = 0.0;
    for (int j = 0; j < 12; j++) begin
      x   = x ^ (x << 13);
      x   = x ^ (x >> 17);
      x   = x ^ (x << 5);
      acc = acc + real'(x) / 4294967296.0;
    end
    return acc - 6.0;
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam real G  = GAIN * (1.0 + SIGMA_A * gauss(i, 0));
    localparam real VO = SIGMA_OFF * gauss(i, 1);
    localparam real A1 = SIGMA_ADC * gauss(i, 2);
    localparam real A2 = SIGMA_ADC * gauss(i, 3);
    localparam real DP = SIGMA_DAC * gauss(i, 4);
    localparam real DN = SIGMA_DAC * gauss(i, 5);
    localparam real CM = SIGMA_DAC * gauss(i, 6);
    wire ca = (i % 2 == 0) ? clk1a : clk2a;
    wire cb = (i % 2 == 0) ? clk1b : clk2b;
    real s_inp, s_inn, s_outp, s_outn;

    if (i == 0) begin : g_in
      assign s_inp = vin_p;
      assign s_inn = vin_n;
    end else begin : g_in
      assign s_inp = g_stage[i-1].s_outp;
      assign s_inn = g_stage[i-1].s_outn;
    end

    basic_block #(
      .AMAX(AMAX), .GAIN(G), .A3(A3), .VOFF(VO), .CMIS(CM),
      .ADC_DEV1(A1), .ADC_DEV2(A2), .DAC_DEVP(DP), .DAC_DEVN(DN)
    ) u_bb (
      .vin_p(s_inp), .vin_n(s_inn), .vcm, .clka(ca), .clkb(cb),
      .e1, .e0, .cal(cal[i]), .c01, .d1(d1[i]), .d0(d0[i]),
      .vout_p(s_outp), .vout_n(s_outn)
    );
  end

  assign vout_p = g_stage[N-1].s_outp;
  assign vout_n = g_stage[N-1].s_outn;
endmodule
