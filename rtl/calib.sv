// calib: main state machine of the calibration (measurement) algorithm.
//
// Idle is normal operation with BSY low. A rising edge on CAL starts a
// calibration: BSY goes high, a one-cycle pulse on Reset clears every
// weight and register of the correction logic and of the measurement
// sub-functions, Calib goes high to enable calibration mode, and Start1 is
// held high until LastSt reports Ready1 (last-stage weights programmed).
// A one-cycle Start2 pulse then launches CalSt, and when CalSt reports
// Ready2 the machine drops Calib and BSY and returns to normal operation.
//
// All outputs are decoded from the state (Moore), synchronous to clk; rst
// is the power-on reset of the logic. The sequence follows the description
// of the Calib function; the pulse lengths and the rising-edge detection
// of CAL are this design's choices.
module calib (
  input  logic clk,
  input  logic rst,
  input  logic cal,
  input  logic ready1,
  input  logic ready2,
  output logic bsy,
  output logic reset_o,
  output logic calib_o,
  output logic start1,
  output logic start2
);
  typedef enum logic [2:0] {IDLE, RESET, LAST, START2, WAIT2} state_t;
  state_t state;
  logic   cal_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      cal_q <= 1'b0;
    end else begin
      cal_q <= cal;
      unique case (state)
        IDLE:    if (cal && !cal_q) state <= RESET;
        RESET:   state <= LAST;
        LAST:    if (ready1) state <= START2;
        START2:  state <= WAIT2;
        WAIT2:   if (ready2) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    bsy     = (state != IDLE);
    reset_o = (state == RESET);
    calib_o = (state == LAST) || (state == START2) || (state == WAIT2);
    start1  = (state == LAST);
    start2  = (state == START2);
  end
endmodule
