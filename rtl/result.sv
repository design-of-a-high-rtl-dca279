// result: accumulates measurement data and forms the weights.
//
// S is a (W+NSUB)-bit register, 32 bits at the defaults. On every clk
// edge with Measure high, the sign-extended converter output D is added
// to S when m is 0 and subtracted when m is 1. A high-to-low transition
// of m clears S, as does rst. After 2^NSUB additions of measurement b and
// 2^NSUB subtractions of measurement a, the top W bits S(31:16) equal the
// average of b minus the average of a, i.e. the weight; likewise c - d.
// The output weight is S[W+NSUB-1:NSUB], valid once the measurement is
// complete. Register width, the m rule and the use of S(31:16) follow the
// Result description; the register is kept as one word here rather than
// split in two halves.
module result
  import adc_pkg::*;
#(
  parameter int W    = WW,
  parameter int NSUB = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                m,
  input  logic                measure,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] weight
);
  logic signed [W+NSUB-1:0] s;
  logic                     m_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s   <= '0;
      m_q <= 1'b0;
    end else begin
      m_q <= m;
      if (m_q && !m)   s <= '0;
      else if (measure) begin
        if (m) s <= s - (W+NSUB)'(d);
        else   s <= s + (W+NSUB)'(d);
      end
    end
  end

  assign weight = s[W+NSUB-1:NSUB];
endmodule
