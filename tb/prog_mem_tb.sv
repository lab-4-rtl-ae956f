// prog_mem_tb: self-check of the byte-wide program RAM: load every byte,
// read all back through the asynchronous port, then random traffic.
module prog_mem_tb;

  logic       clk = 0, we;
  logic [4:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  prog_mem #(.AW(5)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_r();
    checks++;
    if (rdata !== model[raddr]) begin
      failures++;
      $display("FAIL raddr=%0d rdata=%h expected %h", raddr, rdata, model[raddr]);
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
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wdata = 8'(i * 37 + 11); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 32; i++) begin
      raddr = 5'(31 - i); #1; expect_r();
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = 8'($urandom); raddr = 5'($urandom);
      #1; expect_r();
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      expect_r();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
