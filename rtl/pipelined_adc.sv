// pipelined_adc: a 12-bit-class pipelined AD converter built from 16
// identical 1.5-bit stages, with digital post-correction and the
// calibration algorithm that finds the correction weights.
//
// Blocks:
//   analog_pipeline   16 basic blocks (behavioural, real-valued)
//   correction_logic  on-chip sum of one programmable weight per stage
//   measurement       calibration algorithm (in the document an FPGA)
// The input of stage 0 is vin = vin_p - vin_n, which must already be held
// by a front-end sample-and-hold (not part of this model) from before the
// falling edge of CLK1B until the end of that sample phase.
//
// Clocks: CLK1A/CLK1B drive stages 0, 2, 4, ... and CLK2A/CLK2B (the same
// waveforms half a sample period later) stages 1, 3, 5, ...; the
// correction cells register on the falling edges of CLK1A and CLK2A.
// fpga_clk runs the calibration; it must rise while D is stable, for
// instance fpga_clk = CLK2A. The corrected output D (16-bit signed) lags
// the sample moment of stage 0 by eight sample periods.
//
// Use: after rst, pulse cal high; bsy stays high until all weights are
// measured and loaded (about 4*(N-1) * 2^NSUB fpga_clk cycles). Before
// the first calibration all weights are zero and D is zero.
//
// The partitioning and the Reset/Calib/Csel/C01/e1e0/SCLK/SDA connections
// follow the document's converter-with-post-correction structure. The
// combined reset (rst or the calibration Reset pulse) is this design's
// choice; the same pulse is a synchronous reset inside the calibration
// logic and an asynchronous one in the correction cells, as the correction
// logic's function table asks, which the linter reports. The residue of
// the last stage is not used.
module pipelined_adc
  import adc_pkg::*;
#(
  parameter int  N     = NSTAGES,
  parameter int  NSUB  = 16,
  parameter int  DELAY = 32,
  parameter real GAIN  = 1.8647,
  parameter int  SEED  = 1
) (
  input  real                  vin_p,
  input  real                  vin_n,
  input  real                  vcm,
  input  logic                 clk1a,
  input  logic                 clk1b,
  input  logic                 clk2a,
  input  logic                 clk2b,
  input  logic                 fpga_clk,
  input  logic                 rst,
  input  logic                 cal,
  output logic                 bsy,
  output logic signed [WW-1:0] d
);
  logic [N-1:0]      cal_st, d1, d0;
  logic [CSEL_W-1:0] csel;
  logic              c01, e1, e0, sclk, sda, reset_c, calib_c;

  analog_pipeline #(.N(N), .GAIN(GAIN), .SEED(SEED)) u_analog (
    .vin_p, .vin_n, .vcm, .clk1a, .clk1b, .clk2a, .clk2b,
    .cal(cal_st), .e1, .e0, .c01, .d1, .d0, .vout_p(), .vout_n()
  );

  correction_logic #(.N(N), .W(WW)) u_corr (
    .clk1(clk1a), .clk2(clk2a), .reset(rst || reset_c), .calib(calib_c),
    .csel, .c01, .sclk, .sda, .d1, .d0, .cal(cal_st), .d
  );

  measurement #(.N(N), .W(WW), .NSUB(NSUB), .DELAY(DELAY)) u_meas (
    .clk(fpga_clk), .rst, .cal, .bsy, .reset_o(reset_c), .calib_o(calib_c),
    .csel, .c01, .e1, .e0, .sclk, .sda, .d
  );
endmodule
