// Shared constants and types of the pipelined converter.
//
// The converter is a pipeline of NSTAGES identical 1.5-bit basic blocks.
// Every stage reports a two-bit thermometer code d1d0 (00, 01 or 11). The
// digital correction adds one programmable 16-bit two's-complement weight
// per stage; the weight for code 01 is fixed at zero. A calibration
// procedure measures the weights of every stage from the back of the
// pipeline forwards, four measurements (b, a, c, d) per stage.
package adc_pkg;

  localparam int NSTAGES  = 16;   // stages in the pipeline
  localparam int WW       = 16;   // weight and output word width
  localparam int CSEL_W   = 4;    // stage select width

  typedef logic signed [WW-1:0] weight_t;

  // Thermometer code of a 1.5-bit sub-ADC
  typedef enum logic [1:0] {
    CODE_0 = 2'b00,
    CODE_1 = 2'b01,
    CODE_2 = 2'b11
  } code_t;

  // The four measurements of one stage, in the order they are performed.
  //   b: input V_ADC1, code 01      a: input V_ADC1, code 00
  //   c: input V_ADC2, code 01      d: input V_ADC2, code 11
  // weight0 = b - a, weight2 = c - d
  typedef enum logic [1:0] {
    MEAS_B = 2'd0,
    MEAS_A = 2'd1,
    MEAS_C = 2'd2,
    MEAS_D = 2'd3
  } meas_t;

  // Serial programming bus from the measurement algorithm to the correction logic
  typedef struct packed {
    logic [CSEL_W-1:0] csel;  // stage whose weight is addressed
    logic              c01;   // 0: weight0, 1: weight2 (also selects V_ADC1/V_ADC2)
    logic              sclk;  // serial clock, data taken on its rising edge
    logic              sda;   // serial data, MSB first
  } prog_bus_t;

endpackage
