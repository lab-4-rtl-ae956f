// cpu4_core_tb: self-check of the CPU core against the instruction-level
// reference model. All 16 RAM words are first written (LDI, STORE), then
// 3000 random instructions from the whole set run, with exec dropped at
// random to check that nothing changes without it. After every clock ACC,
// PC and the jump strobe are compared; PC must advance by exactly one per
// executed non-jump instruction (one instruction per clock). Every
// instruction, and each conditional jump both taken and not taken, must
// occur at least once.
module cpu4_core_tb;
  import cpu4_pkg::*;
  import cpu4_ref_pkg::*;

  logic       clk = 0, rst_n, exec, jump_taken;
  logic [7:0] byte0, byte1;
  logic [3:0] acc, pc;
  int checks = 0, failures = 0;
  int n_op [N_OPS];
  int n_taken [4], n_not [4];
  int n_carry = 0, n_borrow = 0, n_hold = 0;

  cpu4_core dut (.*);

  cpu4_model mdl = new();

  always #5 clk = ~clk;

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic run(op_e op, logic [3:0] db, logic [3:0] addr, logic ex);
    @(negedge clk);
    byte0 = op; byte1 = {db, addr}; exec = ex;
    #1;
    check("jump strobe", {3'b0, jump_taken}, {3'b0, ex && (
      op == OP_JMPZ || (op == OP_JIFZ && mdl.acc == 0) ||
      (op == OP_JIFN && mdl.acc == 4'hf) || (op == OP_JIFP && mdl.acc == 4'h1))});
    if (ex) begin
      case (op)
        OP_JIFZ: if (mdl.acc == 4'h0) n_taken[0]++; else n_not[0]++;
        OP_JIFN: if (mdl.acc == 4'hf) n_taken[1]++; else n_not[1]++;
        OP_JIFP: if (mdl.acc == 4'h1) n_taken[2]++; else n_not[2]++;
        OP_JMPZ: n_taken[3]++;
        default: ;
      endcase
    end
    @(posedge clk); #1;
    if (ex) begin
      void'(mdl.step(byte0, byte1));
      if (mdl.carry) n_carry++;
      if (mdl.borrow) n_borrow++;
    end else n_hold++;
    check("ACC", acc, mdl.acc);
    check("PC", pc, mdl.pc);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; exec = 0; byte0 = OP_NOP; byte1 = 0;
    mdl.reset();
    #12;
    check("ACC reset", acc, 4'h0);
    check("PC reset", pc, 4'h0);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      run(OP_LDI, 4'(i * 5 + 1), 4'h0, 1'b1);
      run(OP_STORE, 4'h0, 4'(i), 1'b1);
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int k;
      automatic logic [3:0] db;
      k  = int'($urandom_range(N_OPS - 1));
      db = 4'($urandom);
      if (OPS[k] == OP_JIFP) db = JIFP_DB;
      // steer ACC toward the jump conditions now and then
      if (n % 7 == 0) run(OP_LDI, 4'($urandom_range(2)) - 4'd1, 4'h0, 1'b1);
      n_op[k]++;
      run(OPS[k], db, 4'($urandom), ($urandom % 8) != 0);
    end
    foreach (n_op[k]) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL %s never ran", OPS[k].name()); end
    end
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (n_taken[j] == 0 || n_not[j] == 0) begin
        failures++; $display("FAIL conditional jump %0d taken %0d / not taken %0d", j, n_taken[j], n_not[j]);
      end
    end
    checks++;
    if (n_carry == 0 || n_borrow == 0 || n_hold == 0) begin
      failures++; $display("FAIL carry %0d borrow %0d hold %0d", n_carry, n_borrow, n_hold);
    end
    $display("wraps on add %0d, borrows %0d, idle clocks %0d", n_carry, n_borrow, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
