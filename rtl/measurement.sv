// measurement: the calibration (measurement) algorithm, run once after
// power-up to find the correction weights.
//
// It connects the functions Calib, LastSt, CalSt, Controller, Counter,
// Result and Store. The user interface is CAL (rising edge starts) and
// BSY (high while calibrating). Towards the converter it drives Reset
// (clears the correction logic), Calib (calibration mode), Csel and C01
// (stage and weight/reference under measurement), e1e0 (code forced on
// the stage's sub-DAC) and the serial weight interface SCLK/SDA, and it
// reads the corrected converter output D once per clk cycle.
//
// The programming bus is driven by LastSt until it reports Ready1, then
// by the Controller (Csel, C01) and Store (SCLK, SDA). Every sub-function
// is reset by rst or by the Reset pulse of Calib. All logic runs on clk;
// D must be stable at the rising edge of clk. With the defaults a full
// calibration takes about 60 * (2^16 + DELAY + 40) + 40 cycles.
//
// The partitioning and signal names follow the measurement-algorithm
// description; the bus multiplexing and clocking are this design's choice.
module measurement
  import adc_pkg::*;
#(
  parameter int N     = NSTAGES,
  parameter int W     = WW,
  parameter int NSUB  = 16,
  parameter int DELAY = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                cal,
  output logic                bsy,
  output logic                reset_o,
  output logic                calib_o,
  output logic [CSEL_W-1:0]   csel,
  output logic                c01,
  output logic                e1,
  output logic                e0,
  output logic                sclk,
  output logic                sda,
  input  logic signed [W-1:0] d
);
  logic start1, start2, ready1, ready2, srst;
  logic incstate, cnt_clr, measure, store_start, store_ready, cnt_ready, ctrl_ready, m;
  logic signed [W-1:0] weight;
  prog_bus_t last_bus, meas_bus;

  assign srst = rst || reset_o;

  calib u_calib (
    .clk, .rst, .cal, .ready1, .ready2,
    .bsy, .reset_o, .calib_o, .start1, .start2
  );

  lastst #(.N(N), .W(W)) u_lastst (
    .clk, .rst(srst), .start1,
    .csel(last_bus.csel), .c01(last_bus.c01), .sclk(last_bus.sclk), .sda(last_bus.sda),
    .ready1
  );

  calst #(.DELAY(DELAY)) u_calst (
    .clk, .rst(srst), .start2, .ctrl_ready, .cnt_ready, .store_ready,
    .incstate, .cnt_clr, .measure, .store_start, .ready2
  );

  controller #(.N(N)) u_controller (
    .clk, .rst(srst), .incstate,
    .csel(meas_bus.csel), .c01(meas_bus.c01), .e1, .e0, .m, .ready(ctrl_ready)
  );

  counter #(.NSUB(NSUB)) u_counter (
    .clk, .rst(srst), .clr(cnt_clr), .measure, .ready(cnt_ready)
  );

  result #(.W(W), .NSUB(NSUB)) u_result (
    .clk, .rst(srst), .m, .measure, .d, .weight
  );

  store #(.W(W)) u_store (
    .clk, .rst(srst), .start(store_start), .m, .weight,
    .sclk(meas_bus.sclk), .sda(meas_bus.sda), .ready(store_ready)
  );

  always_comb begin
    prog_bus_t bus;
    bus  = ready1 ? meas_bus : last_bus;
    csel = bus.csel;
    c01  = bus.c01;
    sclk = bus.sclk;
    sda  = bus.sda;
  end
endmodule
