// lastst: programs the weights of the last pipeline stage.
//
// The last stage cannot be measured, so its weights are fixed at
// w0 = -1 (0xFFFF) and w2 = +1 (0x0001). Because every weight is zero
// after the calibration reset, w0 needs sixteen ones shifted in and w2 a
// single one. The machine walks states 0..5:
//   0  idle, waits for Start1
//   1  SCLK low,  SDA = 1, Csel = last stage, C01 = 0   } repeated
//   2  SCLK high (weight w0 takes the bit)              } 16 times
//   3  SCLK low,  SDA = 1, C01 = 1
//   4  SCLK high (weight w2 takes the bit)
//   5  Ready1 high; stays here until the synchronous reset
// One state per clk cycle, so the sequence takes 2*16 + 2 cycles after
// Start1. The states and the values shifted follow the LastSt description;
// the one-cycle state length and Csel = 0 in state 5 are this design's
// choices (the latter as the timing sketch of LastSt prints it).
module lastst
  import adc_pkg::*;
#(
  parameter int N = NSTAGES,
  parameter int W = WW
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start1,
  output logic [CSEL_W-1:0] csel,
  output logic              c01,
  output logic              sclk,
  output logic              sda,
  output logic              ready1
);
  typedef enum logic [2:0] {S0, S1, S2, S3, S4, S5} state_t;
  state_t state;
  logic [$clog2(W)-1:0] nbit;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S0;
      nbit  <= '0;
    end else begin
      unique case (state)
        S0: if (start1) begin
              state <= S1;
              nbit  <= '0;
            end
        S1: state <= S2;
        S2: if (nbit == $clog2(W)'(W-1)) state <= S3;
            else begin
              nbit  <= nbit + 1'b1;
              state <= S1;
            end
        S3: state <= S4;
        S4: state <= S5;
        S5: state <= S5;
        default: state <= S0;
      endcase
    end
  end

  always_comb begin
    csel   = (state == S5) ? '0 : CSEL_W'(N-1);
    c01    = (state == S3) || (state == S4);
    sclk   = (state == S2) || (state == S4);
    sda    = (state inside {S1, S2, S3, S4});
    ready1 = (state == S5);
  end
endmodule
