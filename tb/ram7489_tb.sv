// ram7489_tb: self-check of the 16 x 4 data RAM. Fills every word, checks
// the asynchronous read of each, checks that we = 0 writes nothing, then
// runs random reads and writes against a reference array.
module ram7489_tb;

  logic       clk = 0, we;
  logic [3:0] addr, d, q;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  ram7489 #(.AW(4), .DW(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_q(logic [3:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL addr=%h q=%h expected %h", addr, q, exp);
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
    we = 0; addr = 0; d = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; addr = 4'(i); d = 4'(i * 7 + 3);
      model[i] = d;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i); #1; expect_q(model[i]);
    end
    // we low: no write
    @(negedge clk); addr = 4'd5; d = ~model[5]; we = 0;
    @(negedge clk); #1; expect_q(model[5]);
    // random traffic
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      addr = 4'($urandom); d = 4'($urandom); we = 1'($urandom);
      #1; expect_q(model[addr]);
      if (we) model[addr] = d;
    end
    @(negedge clk) we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
