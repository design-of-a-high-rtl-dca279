// Self-checking testbench of mux16: random words, every E/S0 combination,
// compared with the truth table (E low gives zero).
module mux16_tb;
  logic [15:0] d0, d1, y;
  logic        s0, e;
  int checks = 0, failures = 0;

  mux16 dut (.d0, .d1, .s0, .e, .y);

  initial begin
    for (int n = 0; n < 200; n++) begin
      d0 = 16'($urandom);
      d1 = 16'($urandom);
      {e, s0} = 2'(n);
      #1;
      checks++;
      if (y !== (!e ? 16'h0 : (s0 ? d1 : d0))) begin
        failures++;
        $display("FAIL e=%b s0=%b d0=%h d1=%h y=%h", e, s0, d0, d1, y);
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
