// switch_logic: decodes the basic block's phase and code into switch controls.
//
// Inputs: AnotD (1 = sample phase, analog input path), RST (reset phase),
// the latched sub-ADC code d1d0, Cal (calibration mode) and C01.
// Outputs (one-hot, at most one group active):
//   s0..s3 : hold phase, connect sub-DAC levels for codes 00, 01, 11
//   t0     : sample phase, connect the block's analog input
//   t1, t2 : sample phase in calibration mode, connect a sub-ADC reference
//            level (C01 = 0: t1, C01 = 1: t2)
//   u0     : reset phase, connect the common-mode level to all capacitors
// Purely combinational. The truth table is that of the switch-logic table
// in the switch-matrix appendix; AnotD takes priority over RST there. The
// unused code 10 opens every switch, which is this design's choice.
module switch_logic (
  input  logic anotd,
  input  logic rst,
  input  logic d1,
  input  logic d0,
  input  logic cal,
  input  logic c01,
  output logic [3:0] s,
  output logic [2:0] t,
  output logic       u0
);
  always_comb begin
    s  = '0;
    t  = '0;
    u0 = 1'b0;
    if (anotd) begin
      if (!cal)     t[0] = 1'b1;
      else if (!c01) t[1] = 1'b1;
      else          t[2] = 1'b1;
    end else if (rst) begin
      u0 = 1'b1;
    end else begin
      unique case ({d1, d0})
        2'b00:   s = 4'b0011;   // s0 s1
        2'b01:   s = 4'b1001;   // s0 s3
        2'b11:   s = 4'b1100;   // s2 s3
        default: s = 4'b0000;
      endcase
    end
  end
endmodule
