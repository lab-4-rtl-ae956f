// cpu4_stored_tb: loads the lab's test program into the stored-program CPU
// and lets it run three times round its JMPZ loop. After each executing
// clock ACC and PC must match the expected trace
//   LDI 6 (6,1)  STORE 7 (6,2)  LDI 3 (3,3)  LOAD 7 (6,4)  LDI 7 (7,5)
//   ADD 7 (13,6) JIFN (13,7)  ADDI 8 (5,8)  JMPZ (5,0)
// Each instruction must take exactly two clocks: after the first, phase is
// 1 and ACC and PC are unchanged.
module cpu4_stored_tb;
  import cpu4_pkg::*;
  import cpu4_ref_pkg::*;

  logic       clk = 0, rst_n, load_we, phase, jump;
  logic [4:0] load_addr;
  logic [7:0] load_data;
  logic [6:0] acc_seg_n, pc_seg_n;
  logic [3:0] acc, pc;
  int checks = 0, failures = 0;

  cpu4_stored dut (.*);

  always #5 clk = ~clk;

  localparam int N = 11;
  logic [15:0] prog [N];
  logic [3:0]  exp_acc [9] = '{4'd6, 4'd6, 4'd3, 4'd6, 4'd7, 4'd13, 4'd13, 4'd5, 4'd5};
  logic [3:0]  exp_pc  [9] = '{4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd0};

  task automatic check(string what, logic [6:0] got, logic [6:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog = '{instr(OP_LDI, 4'd6, 4'd0), instr(OP_STORE, 4'd0, 4'd7),
             instr(OP_LDI, 4'd3, 4'd0), instr(OP_LOAD, 4'd0, 4'd7),
             instr(OP_LDI, 4'd7, 4'd0), instr(OP_ADD, 4'd0, 4'd7),
             instr(OP_JIFN, 4'd0, 4'd0), instr(OP_ADDI, 4'd8, 4'd0),
             instr(OP_JMPZ, 4'd0, 4'd0), instr(OP_LDI, 4'd0, 4'd0),
             instr(OP_JIFZ, 4'd0, 4'd0)};
    rst_n = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 2 * N; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 5'(i);
      load_data = (i % 2 == 0) ? prog[i / 2][15:8] : prog[i / 2][7:0];
    end
    @(negedge clk) load_we = 0;
    check("held in reset", 7'({acc, pc}), 7'd0);
    rst_n = 1;
    for (int n = 0; n < 27; n++) begin
      logic [3:0] a0, p0;
      a0 = acc; p0 = pc;
      @(posedge clk); #1;
      check("phase 1", 7'(phase), 7'd1);
      check("ACC held", 7'(acc), 7'(a0));
      check("PC held", 7'(pc), 7'(p0));
      @(posedge clk); #1;
      check("phase 0", 7'(phase), 7'd0);
      check("ACC", 7'(acc), 7'(exp_acc[n % 9]));
      check("PC", 7'(pc), 7'(exp_pc[n % 9]));
      check("ACC display", acc_seg_n, glyph_n(exp_acc[n % 9]));
      check("PC display", pc_seg_n, glyph_n(exp_pc[n % 9]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
