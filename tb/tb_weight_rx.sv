// Testbench model of the receiving side of the serial weight interface:
// one 16-bit register per stage and weight, shifting SDA in at bit 0 on
// each rising SCLK edge while enabled, for the register that Csel and C01
// address. It also counts the writes per register. Used to check what the
// calibration logic transmits, independently of the correction cells.
module tb_weight_rx (
  input  logic       clr,
  input  logic       en,
  input  logic [3:0] csel,
  input  logic       c01,
  input  logic       sclk,
  input  logic       sda
);
  logic [15:0] w [16][2];
  int          nbits [16][2];

  always @(posedge sclk or posedge clr) begin
    if (clr) begin
      for (int i = 0; i < 16; i++)
        for (int k = 0; k < 2; k++) begin
          w[i][k] = '0;
          nbits[i][k] = 0;
        end
    end else if (en) begin
      w[csel][c01] = {w[csel][c01][14:0], sda};
      nbits[csel][c01]++;
    end
  end
endmodule
