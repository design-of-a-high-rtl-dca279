// Self-checking testbench of switch_logic: all 64 input combinations
// against the switch-logic truth table, written here as an independent
// table lookup. Code 10 must open every switch.
module switch_logic_tb;
  logic       anotd, rst, d1, d0, cal, c01, u0;
  logic [3:0] s;
  logic [2:0] t;
  logic [7:0] got, exp_v;
  int checks = 0, failures = 0;

  switch_logic dut (.anotd, .rst, .d1, .d0, .cal, .c01, .s, .t, .u0);

  // returns {s0,s1,s2,s3,t0,t1,t2,u0}
  function automatic logic [7:0] table_a1(logic a, logic r, logic [1:0] dd, logic c, logic k);
    if (a) begin
      if (!c)      return 8'b0000_1000;
      else if (!k) return 8'b0000_0100;
      else         return 8'b0000_0010;
    end
    if (r) return 8'b0000_0001;
    case (dd)
      2'b00:   return 8'b1100_0000;
      2'b01:   return 8'b1001_0000;
      2'b11:   return 8'b0011_0000;
      default: return 8'b0000_0000;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 64; n++) begin
      {anotd, rst, d1, d0, cal, c01} = 6'(n);
      #1;
      got   = {s[0], s[1], s[2], s[3], t[0], t[1], t[2], u0};
      exp_v = table_a1(anotd, rst, {d1, d0}, cal, c01);
      checks++;
      if (got !== exp_v) begin
        failures++;
        $display("FAIL in=%b got=%b exp=%b", 6'(n), got, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
