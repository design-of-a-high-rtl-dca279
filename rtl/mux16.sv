// mux16: 16-bit two-input multiplexer with an enable.
//
// With E low the output is zero; with E high, S0 selects d1 (S0 = 1) or d0
// (S0 = 0). Combinational, no timing. The truth table follows the
// correction-logic appendix; the width is a parameter with that default.
module mux16 #(
  parameter int W = 16
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         s0,
  input  logic         e,
  output logic [W-1:0] y
);
  always_comb begin
    if (!e)      y = '0;
    else if (s0) y = d1;
    else         y = d0;
  end
endmodule
