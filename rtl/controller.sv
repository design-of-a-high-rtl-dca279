// controller: sets up each calibration measurement.
//
// A state counter runs from 0 (reset) through 4*(N-1) measurement states
// to a ready state 4*(N-1)+1 (61 for 16 stages); each IncState pulse
// advances it by one. Measurement state n (1-based) addresses stage
// N-2 - (n-1)/4, so stage 14 is measured first and stage 0 last, and
// performs measurement b, a, c, d in turn:
//            C01  e1e0  m
//   b         0    01   0   (added)
//   a         0    00   1   (subtracted, then w0 = b - a is stored)
//   c         1    01   0   (added; m falling clears the accumulator)
//   d         1    11   1   (subtracted, then w2 = c - d is stored)
// In the reset and ready states all outputs are zero. Outputs are decoded
// from the registered state. The order, the table of inputs and the state
// count follow the Controller description and the measurement table; the
// output values in the reset and ready states are this design's choice.
module controller
  import adc_pkg::*;
#(
  parameter int N = NSTAGES
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              incstate,
  output logic [CSEL_W-1:0] csel,
  output logic              c01,
  output logic              e1,
  output logic              e0,
  output logic              m,
  output logic              ready
);
  localparam int LAST = 4 * (N - 1) + 1;
  localparam int SW   = $clog2(LAST + 1);

  logic [SW-1:0] state;
  logic [SW-1:0] k;
  meas_t         meas;

  always_ff @(posedge clk) begin
    if (rst)                          state <= '0;
    else if (incstate && !ready)      state <= state + 1'b1;
  end

  always_comb begin
    ready = (state == SW'(LAST));
    k     = state - 1'b1;
    meas  = meas_t'(k[1:0]);
    csel  = '0;
    c01   = 1'b0;
    e1    = 1'b0;
    e0    = 1'b0;
    m     = 1'b0;
    if (state != '0 && !ready) begin
      csel = CSEL_W'(N - 2 - int'(k[SW-1:2]));
      unique case (meas)
        MEAS_B: begin c01 = 1'b0; {e1, e0} = CODE_1; m = 1'b0; end
        MEAS_A: begin c01 = 1'b0; {e1, e0} = CODE_0; m = 1'b1; end
        MEAS_C: begin c01 = 1'b1; {e1, e0} = CODE_1; m = 1'b0; end
        MEAS_D: begin c01 = 1'b1; {e1, e0} = CODE_2; m = 1'b1; end
      endcase
    end
  end
endmodule
