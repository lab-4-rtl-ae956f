// mux157_tb: self-check of the quad 2-to-1 selector over all inputs,
// including the active-low strobe.
module mux157_tb;

  logic [3:0] a, b, y;
  logic       sel, g_n;
  int checks = 0, failures = 0;

  mux157 #(.W(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int i = 0; i < 1024; i++) begin
      {a, b, sel, g_n} = 10'(i);
      #1;
      exp = g_n ? 4'h0 : (sel ? b : a);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h sel=%b g_n=%b y=%h exp=%h", a, b, sel, g_n, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
