// ctrl_glue_tb: exhaustive self-check of the control decode against its
// truth table (STORE, jump taken / not taken, ordinary ALU instruction,
// idle clock).
module ctrl_glue_tb;

  logic exec, mux, w, aeqb, ram_we, acc_load, jump;
  int checks = 0, failures = 0;

  ctrl_glue dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;  // {ram_we, acc_load, jump}
    for (int i = 0; i < 16; i++) begin
      {exec, mux, w, aeqb} = 4'(i);
      #1;
      if (!exec)             exp = 3'b000;
      else if (mux && w)     exp = {2'b00, aeqb};   // jump instruction
      else if (w)            exp = 3'b110;          // STORE
      else                   exp = 3'b010;          // ALU result to ACC
      checks++;
      if ({ram_we, acc_load, jump} !== exp) begin
        failures++;
        $display("FAIL exec=%b mux=%b w=%b aeqb=%b got %b expected %b",
                 exec, mux, w, aeqb, {ram_we, acc_load, jump}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
