// Self-checking testbench of correction_logic.
// 1. Loads random weights w0, w2 into all 16 cells over SCLK/SDA with
//    Calib high, checking that Cal is the one-hot decode of Csel; then
//    tries to overwrite a weight with Calib low (must be ignored).
// 2. Feeds random stage codes in step with the two clock phases (stage i
//    takes its code for sample n at the i-th half period) and compares D
//    with the sum of the selected weights, computed here. A code is valid
//    only near its cell's clock edge, so the clock phase of each cell is
//    checked as well.
// 3. Checks the latency: sample n taken by stage 0 at the falling CLK1A
//    edge of period n appears on D 7.5 periods later.
module correction_logic_tb;
  import adc_pkg::*;
  localparam int NS = 300;
  logic        clk1a, clk1b, clk2a, clk2b;
  logic        reset, calib, c01, sclk, sda;
  logic [3:0]  csel;
  logic [15:0] d1, d0, cal;
  logic signed [15:0] d;
  logic signed [15:0] w0 [16], w2 [16];
  logic [1:0]  code [NS][16];
  int          idx [16];
  int checks = 0, failures = 0;
  time t_first_s0, t_first_d;

  tb_clkgen #(.TS(10)) u_clk (.clk1a, .clk1b, .clk2a, .clk2b);

  correction_logic dut (
    .clk1(clk1a), .clk2(clk2a), .reset, .calib, .csel, .c01, .sclk, .sda,
    .d1, .d0, .cal, .d
  );

  task automatic send(int st, logic sel, logic [15:0] w);
    csel = 4'(st); c01 = sel;
    #1;
    checks++;
    if (cal !== (calib ? (16'd1 << st) : 16'd0)) begin
      failures++; $display("FAIL cal=%h csel=%0d calib=%b", cal, st, calib);
    end
    for (int b = 15; b >= 0; b--) begin
      sda = w[b]; #1 sclk = 1; #1 sclk = 0;
    end
  endtask

  function automatic logic [1:0] rcode();
    case ($urandom_range(2))
      0: return 2'b00;
      1: return 2'b01;
      default: return 2'b11;
    endcase
  endfunction

  function automatic logic signed [15:0] expected(int n);
    logic signed [15:0] acc = 0;
    for (int i = 0; i < 16; i++)
      acc += (code[n][i] == 2'b00) ? w0[i] : (code[n][i] == 2'b11) ? w2[i] : 16'sd0;
    return acc;
  endfunction

  // stage i presents the code of sample idx[i] and advances after its cell
  // took it. Like a real stage, whose code is only latched around the end of
  // its own sample phase, the code is valid only from 3 ns before to 1 ns
  // after the cell's clock edge; otherwise a wrong code is shown, so a cell
  // clocked on the other phase picks up wrong weights.
  logic [15:0] valid = '1;
  for (genvar i = 0; i < 16; i++) begin : g_drv
    wire ck = (i % 2 == 0) ? clk1a : clk2a;
    always @(negedge ck) begin
      if (idx[i] < NS - 1 && $time >= 3000 + 5 * i) begin
        if (i == 0 && idx[0] == 0) t_first_s0 = $time;
        #1 idx[i] = idx[i] + 1;
        valid[i] = 1'b0;
        #6 valid[i] = 1'b1;
      end
    end
    assign {d1[i], d0[i]} = valid[i] ? code[idx[i]][i] :
                            (code[idx[i]][i] == 2'b00) ? 2'b11 : 2'b00;
  end

  int nout = 0;
  initial begin
    for (int n = 0; n < NS; n++)
      for (int i = 0; i < 16; i++) code[n][i] = rcode();
    for (int i = 0; i < 16; i++) idx[i] = 0;
    {calib, c01, sclk, sda} = '0; csel = 0;
    reset = 1; #3 reset = 0;
    calib = 1;
    for (int i = 0; i < 16; i++) begin
      w0[i] = 16'($urandom); w2[i] = 16'($urandom);
      send(i, 0, w0[i]);
      send(i, 1, w2[i]);
    end
    calib = 0;
    send(3, 0, 16'h5555);   // ignored
    wait ($time > 2990);
    // outputs: each falling CLK2A edge stage 15 takes a new sample
    forever begin
      @(negedge clk2a);
      #2;
      if (idx[15] > 0) begin
        if (nout == 0) t_first_d = $time - 2;
        checks++;
        if (d !== expected(idx[15] - 1)) begin
          failures++;
          $display("FAIL sample %0d d=%0d exp=%0d", idx[15] - 1, d, expected(idx[15] - 1));
        end
        nout++;
        if (nout == NS - 20) break;
      end
    end
    checks++;
    if (t_first_d - t_first_s0 != 75) begin
      failures++;
      $display("FAIL latency %0d - %0d", t_first_d, t_first_s0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
