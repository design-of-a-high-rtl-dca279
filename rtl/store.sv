// store: sends a finished weight to the correction logic.
//
// Started by a one-cycle pulse when a measurement is complete. If m is 0
// the measurement has no weight to send yet and Ready is given on the next
// cycle. If m is 1 the weight (the top word of the Result accumulator) is
// captured and shifted out MSB first: for each bit one cycle with SCLK low
// and SDA set, then one cycle with SCLK high, so the receiver takes the bit
// on the rising edge. Ready is a one-cycle pulse after the last bit, 2*W+1
// cycles after the start. Csel and C01 are already held by the Controller.
// The m rule and the MSB-first rising-edge protocol follow the Store
// description; the two-cycle bit period is this design's choice.
module store
  import adc_pkg::*;
#(
  parameter int W = WW
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                m,
  input  logic signed [W-1:0] weight,
  output logic                sclk,
  output logic                sda,
  output logic                ready
);
  typedef enum logic [1:0] {IDLE, LO, HI, DONE} state_t;
  state_t               state;
  logic [W-1:0]         w_q;
  logic [$clog2(W)-1:0] idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      w_q   <= '0;
      idx   <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
                w_q   <= weight;
                idx   <= $clog2(W)'(W-1);
                state <= m ? LO : DONE;
              end
        LO:   state <= HI;
        HI:   if (idx == '0) state <= DONE;
              else begin
                idx   <= idx - 1'b1;
                state <= LO;
              end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    sclk  = (state == HI);
    sda   = (state == LO || state == HI) ? w_q[idx] : 1'b0;
    ready = (state == DONE);
  end
endmodule
