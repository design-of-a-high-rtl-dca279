// Four-phase clock generator for the converter testbenches.
// Sample period TS (default 10 ns, i.e. 100 MS/s). Within each period:
//   0      CLK1A falls (stages 0,2,.. enter hold), CLK2A rises (1,3,.. sample)
//   0.3 TS CLK2B falls (sample moment of stages 1,3,..)
//   0.4 TS CLK1B rises (reset of stages 0,2,..)
//   0.5 TS CLK1A rises (stages 0,2,.. sample), CLK2A falls (1,3,.. hold)
//   0.8 TS CLK1B falls (sample moment of stages 0,2,..)
//   0.9 TS CLK2B rises (reset of stages 1,3,..)
// CLK2A/CLK2B are CLK1A/CLK1B delayed by half a period. CLK1A and CLK2A
// switch on the half-period grid; the B clocks sit between, in the order
// the converter needs: the next stage's sample moment (its CLKB falling)
// comes before the reset of the current stage (its CLKB rising while its
// CLKA is still low), and each sample moment comes a short time tau
// (0.2 TS here) before the end of the sample phase. The exact fractions
// are this generator's choice.
module tb_clkgen #(
  parameter int TS = 10
) (
  output logic clk1a,
  output logic clk1b,
  output logic clk2a,
  output logic clk2b
);
  initial begin
    clk1a = 1'b1; clk1b = 1'b0; clk2a = 1'b0; clk2b = 1'b1;
    forever begin
      clk1a = 1'b0; clk2a = 1'b1;
      #(TS * 3 / 10);
      clk2b = 1'b0;
      #(TS * 4 / 10 - TS * 3 / 10);
      clk1b = 1'b1;
      #(TS / 2 - TS * 4 / 10);
      clk1a = 1'b1; clk2a = 1'b0;
      #(TS * 8 / 10 - TS / 2);
      clk1b = 1'b0;
      #(TS * 9 / 10 - TS * 8 / 10);
      clk2b = 1'b1;
      #(TS - TS * 9 / 10);
    end
  end
endmodule
