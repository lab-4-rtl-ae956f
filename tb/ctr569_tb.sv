// ctr569_tb: self-check of the up/down program counter: counting up and
// down with wrap, enables, parallel load, synchronous and asynchronous clear
// and their priority, and the ripple carry output, against a reference
// model driven with random controls.
module ctr569_tb;

  logic       clk = 0, aclr_n, sclr_n, load_n, enp_n, ent_n, up, rco_n;
  logic [3:0] d, q, model;
  int checks = 0, failures = 0;
  int n_wrap_up = 0, n_wrap_dn = 0;

  ctr569 #(.W(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_state(string what);
    logic exp_rco;
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s q=%h expected %h", what, q, model);
    end
    exp_rco = !(ent_n == 0 && (up ? model == 4'hf : model == 4'h0));
    checks++;
    if (rco_n !== exp_rco) begin
      failures++;
      $display("FAIL rco_n=%b expected %b (q=%h up=%b ent_n=%b)", rco_n, exp_rco, q, up, ent_n);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aclr_n = 0; sclr_n = 1; load_n = 1; enp_n = 0; ent_n = 0; up = 1; d = 0; model = 0;
    #12; expect_state("aclr");
    aclr_n = 1;
    // plain count up through a wrap: one step per clock
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1; model = model + 1; expect_state("count up");
    end
    up = 0;
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1; model = model - 1; expect_state("count down");
    end
    // random controls
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sclr_n = ($urandom % 8) != 0;
      load_n = ($urandom % 6) != 0;
      enp_n  = ($urandom % 4) == 0;
      ent_n  = ($urandom % 4) == 0;
      up     = 1'($urandom);
      d      = 4'($urandom);
      #1; expect_state("before edge");
      @(posedge clk); #1;
      if (!sclr_n)              model = 0;
      else if (!load_n)         model = d;
      else if (!enp_n && !ent_n) begin
        if (up && model == 4'hf) n_wrap_up++;
        if (!up && model == 4'h0) n_wrap_dn++;
        model = up ? model + 1 : model - 1;
      end
      expect_state("after edge");
      if (n % 101 == 50) begin
        #2 aclr_n = 0; #1 model = 0; expect_state("aclr"); aclr_n = 1;
      end
    end
    checks++;
    if (n_wrap_up == 0 || n_wrap_dn == 0) begin
      failures++;
      $display("FAIL random run never wrapped (%0d up, %0d down)", n_wrap_up, n_wrap_dn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
