// slicefirst: the correction cell of the first pipeline stage.
//
// It behaves exactly like sliceother with its partial-sum input X fixed to
// zero, as the correction-logic appendix states, so its output is the
// registered weight of stage 0 selected by that stage's code. Same ports
// as sliceother minus X; output registered on the falling edge of CLK.
module slicefirst #(
  parameter int W = 16
) (
  input  logic                d0,
  input  logic                d1,
  input  logic                ce,
  input  logic                sel,
  input  logic                sda,
  input  logic                sclk,
  input  logic                rst,
  input  logic                clk,
  output logic signed [W-1:0] y
);
  sliceother #(.W(W)) u_slice (
    .d0, .d1, .x('0), .ce, .sel, .sda, .sclk, .rst, .clk, .y
  );
endmodule
