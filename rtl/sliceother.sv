// sliceother: one cell of the digital correction pipeline.
//
// The cell holds the two programmable weights w0 and w2 of one pipeline
// stage. The stage code d1d0 selects w0 (00), zero (01) or w2 (11); the
// selected weight is added to the partial sum X of the preceding cells and
// the result is registered on the falling edge of CLK into Y. A stage code
// 10 never occurs in a thermometer code; it selects w2 here.
//
// Programming: with CE high, SEL picks w0 (0) or w2 (1); on every rising
// edge of SCLK the picked weight shifts left by one and SDA enters at bit
// 0, so sixteen clocks load a word MSB first. RST is asynchronous and
// clears both weights and Y.
//
// The function tables (weight select, serial load, falling-edge output
// register, asynchronous reset) follow the correction-logic appendix. The
// weight select uses the mux16 cell with E = not(code 01) and S0 = d1; that
// wiring is this design's choice.
module sliceother #(
  parameter int W = 16
) (
  input  logic                d0,
  input  logic                d1,
  input  logic signed [W-1:0] x,
  input  logic                ce,
  input  logic                sel,
  input  logic                sda,
  input  logic                sclk,
  input  logic                rst,
  input  logic                clk,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] w0, w2, w_sel, s;

  // serial weight load, MSB first
  always_ff @(posedge sclk or posedge rst) begin
    if (rst) begin
      w0 <= '0;
      w2 <= '0;
    end else if (ce) begin
      if (sel) w2 <= {w2[W-2:0], sda};
      else     w0 <= {w0[W-2:0], sda};
    end
  end

  mux16 #(.W(W)) u_wsel (
    .d0(w0),
    .d1(w2),
    .s0(d1),
    .e (~(~d1 & d0)),
    .y (w_sel)
  );

  assign s = x + w_sel;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) y <= '0;
    else     y <= s;
  end
endmodule
