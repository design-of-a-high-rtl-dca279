// calst: the measurement loop of the calibration.
//
// After a Start2 pulse the machine repeats Loop -> Delay -> Measure ->
// Store once per measurement:
//   LOOP     one-cycle IncState to the Controller, counter cleared
//   CHECK    if the Controller reached its ready state, finish (Ready2)
//   DELAY    wait DELAY cycles so the converter pipeline shows data that
//            belongs to the new measurement set-up
//   MEASURE  Measure is high for 2^NSUB cycles, until the Counter is ready
//   STORE    one-cycle start to Store, then wait for its Ready
// Ready2 stays high until the synchronous reset. The loop structure
// follows the CalSt flowchart description; the CHECK state placement and
// the DELAY value are this design's choices (the document asks only for
// "a short delay" that covers the converter latency).
module calst #(
  parameter int DELAY = 32
) (
  input  logic clk,
  input  logic rst,
  input  logic start2,
  input  logic ctrl_ready,
  input  logic cnt_ready,
  input  logic store_ready,
  output logic incstate,
  output logic cnt_clr,
  output logic measure,
  output logic store_start,
  output logic ready2
);
  typedef enum logic [2:0] {IDLE, LOOP, CHECK, DLY, MEAS, STGO, STWAIT, DONE} state_t;
  state_t state;
  logic [$clog2(DELAY+1)-1:0] dcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      dcnt  <= '0;
    end else begin
      unique case (state)
        IDLE:   if (start2) state <= LOOP;
        LOOP:   state <= CHECK;
        CHECK:  begin
                  dcnt  <= '0;
                  state <= ctrl_ready ? DONE : DLY;
                end
        DLY:    if (dcnt == ($clog2(DELAY+1))'(DELAY - 1)) state <= MEAS;
                else dcnt <= dcnt + 1'b1;
        MEAS:   if (cnt_ready) state <= STGO;
        STGO:   state <= STWAIT;
        STWAIT: if (store_ready) state <= LOOP;
        DONE:   state <= DONE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    incstate    = (state == LOOP);
    cnt_clr     = (state == LOOP);
    measure     = (state == MEAS) && !cnt_ready;
    store_start = (state == STGO);
    ready2      = (state == DONE);
  end
endmodule
