// reg174_tb: self-check of the clearable D register: load, hold with en low,
// asynchronous clear between clock edges.
module reg174_tb;

  logic       clk = 0, clr_n, en;
  logic [5:0] d, q, model;
  int checks = 0, failures = 0;

  reg174 #(.W(6)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_q(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s q=%h expected %h", what, q, model);
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
    clr_n = 0; en = 0; d = 0; model = 0;
    #12; expect_q("clear");
    clr_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d = 6'($urandom); en = 1'($urandom);
      @(posedge clk); #1;
      if (en) model = d;
      expect_q("clock");
      if (n % 37 == 5) begin
        #2 clr_n = 0; #1 model = 0; expect_q("async clear"); clr_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
