// correction_logic: on-chip digital post-correction of the pipelined ADC.
//
// Each pipeline stage i delivers a code d1(i)d0(i). A chain of NSTAGES
// correction cells adds, for every sample, the programmable weight that
// each stage's code selects, so the last cell outputs the corrected code
//   D = sum_i w_{code(i)}(i)
// as a 16-bit signed word. The chain is pipelined like the analog
// pipeline it follows: cells of stages 0, 2, 4, ... register on the
// falling edge of CLK1, cells of stages 1, 3, 5, ... on the falling edge of
// CLK2, where CLK2 is CLK1 delayed by half a sample period. A code is
// therefore taken half a period after the previous stage's, in step with
// the analog hold phases, and D appears NSTAGES half periods (8 sample
// periods for 16 stages) after stage 0 took its code.
//
// Calibration interface: with Calib high, Cal(Csel) is raised to put that
// stage in calibration mode, and the weight picked by Csel and C01 loads
// from SCLK/SDA (rising edge, MSB first). With Calib low, Cal is all zero
// and serial data is ignored. Reset clears all weights and registers.
//
// The stage count, word width, ports and the Calib/Cal/serial behaviour
// follow the correction-logic appendix. Which clock drives which cell is
// this design's reading of the alternating stage clocks.
module correction_logic
  import adc_pkg::*;
#(
  parameter int N = NSTAGES,
  parameter int W = WW
) (
  input  logic                clk1,
  input  logic                clk2,
  input  logic                reset,
  input  logic                calib,
  input  logic [CSEL_W-1:0]   csel,
  input  logic                c01,
  input  logic                sclk,
  input  logic                sda,
  input  logic [N-1:0]        d1,
  input  logic [N-1:0]        d0,
  output logic [N-1:0]        cal,
  output logic signed [W-1:0] d
);
  logic signed [W-1:0] y [N];

  always_comb begin
    cal = '0;
    if (calib) cal[csel] = 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_slice
    // even stage index uses CLK1, odd uses CLK2
    wire ck = (i % 2 == 0) ? clk1 : clk2;
    if (i == 0) begin : g_first
      slicefirst #(.W(W)) u_cell (
        .d0(d0[i]), .d1(d1[i]), .ce(cal[i]), .sel(c01), .sda(sda),
        .sclk(sclk), .rst(reset), .clk(ck), .y(y[i])
      );
    end else begin : g_other
      sliceother #(.W(W)) u_cell (
        .d0(d0[i]), .d1(d1[i]), .x(y[i-1]), .ce(cal[i]), .sel(c01),
        .sda(sda), .sclk(sclk), .rst(reset), .clk(ck), .y(y[i])
      );
    end
  end

  assign d = y[N-1];
endmodule
