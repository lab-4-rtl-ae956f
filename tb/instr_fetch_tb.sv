// instr_fetch_tb: self-check of the byte-serial fetch: after reset the phase
// is 0; each clock toggles it; the byte present in phase 0 is held as byte 0
// through phase 1, where exec is high and byte 1 is the current input.
module instr_fetch_tb;

  logic       clk = 0, rst_n, phase, exec;
  logic [7:0] byte_in, byte0, byte1, last0;
  int checks = 0, failures = 0;

  instr_fetch dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; byte_in = 0;
    #12; check("phase after reset", {7'b0, phase}, 8'h00);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      // phase 0: present byte 0
      byte_in = 8'($urandom); last0 = byte_in;
      check("phase 0", {7'b0, phase}, 8'h00);
      check("exec low", {7'b0, exec}, 8'h00);
      // phase 1: present byte 1
      @(negedge clk);
      byte_in = 8'($urandom);
      #1;
      check("phase 1", {7'b0, phase}, 8'h01);
      check("exec high", {7'b0, exec}, 8'h01);
      check("byte0 held", byte0, last0);
      check("byte1", byte1, byte_in);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
