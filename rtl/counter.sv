// counter: counts the sub-measurements of one measurement.
//
// A register accumulates the Measure input (one per sub-measurement);
// Ready is the register bit of weight 2^NSUB, so it rises after exactly
// 2^NSUB sub-measurements. Clear (synchronous, with rst) empties the
// register before each measurement. The adder-register-slice structure
// follows the counter circuit of the measurement appendix; NSUB = 16
// (2^16 sub-measurements) is the document's number.
module counter #(
  parameter int NSUB = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  input  logic measure,
  output logic ready
);
  logic [NSUB:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || clr)   cnt <= '0;
    else if (measure) cnt <= cnt + 1'b1;
  end

  assign ready = cnt[NSUB];
endmodule
