// cpu4_top_tb: end-to-end test of both CPUs in the top level, at its
// default parameters, against the instruction-level reference model.
//
// Part 1 (switch-programmed): every RAM word is written, then 2000 random
// instructions from the whole set are entered one per clock; ACC, PC, the
// jump strobe and both displays are checked after every clock.
// Part 2 (stored program): a loop program is loaded that counts in RAM
// word 0 and leaves through JIFP, JIFZ, JIFN or finally JMPZ depending on
// the count, so every conditional jump is seen taken and not taken as the
// count wraps. The first LOAD of RAM word 0 (not reset) sets the model's
// copy from what the design shows. ACC, PC and phase are checked after
// every clock; each instruction must take two clocks.
// Mechanisms counted (each must occur): every instruction; each jump taken
// and not taken; an add that wraps past 15; a subtract that borrows; a
// LOAD of a value written by STORE; a two-clock serial fetch.
module cpu4_top_tb;
  import cpu4_pkg::*;
  import cpu4_ref_pkg::*;

  logic       p1_clk = 0, p1_rst_n, p2_clk = 0, p2_rst_n, p2_load_we;
  logic [7:0] p1_dip0, p1_dip1, p2_load_data;
  logic [4:0] p2_load_addr;
  logic [6:0] p1_acc_seg_n, p1_pc_seg_n, p2_acc_seg_n, p2_pc_seg_n;
  logic [3:0] p1_acc, p1_pc, p2_acc, p2_pc;
  logic       p1_phase, p1_jump, p2_phase, p2_jump;
  int checks = 0, failures = 0;

  cpu4_top dut (.*);

  always #5 p1_clk = ~p1_clk;
  always #7 p2_clk = ~p2_clk;

  cpu4_model m1 = new();
  cpu4_model m2 = new();

  int n_op [N_OPS];
  int n_taken [4], n_not [4];
  int n_carry = 0, n_borrow = 0, n_loadback = 0, n_serial = 0;

  task automatic check(string what, logic [6:0] got, logic [6:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic int op_index(logic [7:0] b0);
    foreach (OPS[k]) if (OPS[k] == b0) return k;
    return -1;
  endfunction

  // Record the mechanisms an instruction is about to exercise.
  function automatic void count(cpu4_model m, logic [7:0] b0, logic [7:0] b1);
    int k = op_index(b0);
    if (k >= 0) n_op[k]++;
    case (b0)
      OP_JIFZ: if (m.acc == 4'h0) n_taken[0]++; else n_not[0]++;
      OP_JIFN: if (m.acc == 4'hf) n_taken[1]++; else n_not[1]++;
      OP_JIFP: if (m.acc == 4'h1) n_taken[2]++; else n_not[2]++;
      OP_JMPZ: n_taken[3]++;
      OP_LOAD: if (m.known[b1[3:0]]) n_loadback++;
      default: ;
    endcase
  endfunction

  task automatic p1_exec(op_e op, logic [3:0] db, logic [3:0] addr);
    @(negedge p1_clk);
    p1_dip0 = op; p1_dip1 = {db, addr};
    #1;
    check("p1 jump strobe", 7'(p1_jump), 7'(op == OP_JMPZ ||
          (op == OP_JIFZ && m1.acc == 0) || (op == OP_JIFN && m1.acc == 4'hf) ||
          (op == OP_JIFP && m1.acc == 4'h1)));
    count(m1, p1_dip0, p1_dip1);
    @(posedge p1_clk); #1;
    void'(m1.step(p1_dip0, p1_dip1));
    if (m1.carry) n_carry++;
    if (m1.borrow) n_borrow++;
    check("p1 ACC", 7'(p1_acc), 7'(m1.acc));
    check("p1 PC", 7'(p1_pc), 7'(m1.pc));
    check("p1 ACC display", p1_acc_seg_n, glyph_n(m1.acc));
    check("p1 PC display", p1_pc_seg_n, glyph_n(m1.pc));
  endtask

  // Part 2 program: count in RAM word 0, leave by one of the jumps.
  localparam int N2 = 11;
  logic [15:0] prog2 [N2];

  initial begin
    repeat (40000) @(posedge p1_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p1_rst_n = 0; p2_rst_n = 0; p2_load_we = 0; p2_load_addr = 0; p2_load_data = 0;
    p1_dip0 = OP_NOP; p1_dip1 = 0;
    m1.reset(); m2.reset();
    #20 p1_rst_n = 1;

    // ---------------- part 1 ----------------
    for (int i = 0; i < 16; i++) begin
      p1_exec(OP_LDI, 4'($urandom), 4'h0);
      p1_exec(OP_STORE, 4'h0, 4'(i));
    end
    for (int n = 0; n < 2000; n++) begin
      automatic int k = int'($urandom_range(N_OPS - 1));
      automatic logic [3:0] db = (OPS[k] == OP_JIFP) ? JIFP_DB : 4'($urandom);
      if (n % 5 == 0) p1_exec(OP_LDI, 4'($urandom_range(2)) - 4'd1, 4'h0);
      p1_exec(OPS[k], db, 4'($urandom));
    end

    // ---------------- part 2 ----------------
    prog2 = '{instr(OP_LOAD, 4'd0, 4'd0),   // 0  ACC = n
              instr(OP_ADDI, 4'd1, 4'd0),   // 1  n + 1
              instr(OP_STORE, 4'd0, 4'd0),  // 2  n = n + 1
              instr(OP_JIFP, JIFP_DB, 4'd0),// 3  leave if n + 1 = 1
              instr(OP_SUBI, 4'd2, 4'd0),   // 4  n - 1
              instr(OP_JIFZ, 4'd0, 4'd0),   // 5  leave if n = 1
              instr(OP_SUBI, 4'd2, 4'd0),   // 6  n - 3
              instr(OP_JIFN, 4'd0, 4'd0),   // 7  leave if n = 2
              instr(OP_SHIFT, 4'd0, 4'd0),  // 8
              instr(OP_OR, 4'd0, 4'd0),     // 9
              instr(OP_JMPZ, 4'd0, 4'd0)};  // 10 leave
    for (int i = 0; i < 2 * N2; i++) begin
      @(negedge p2_clk);
      p2_load_we = 1; p2_load_addr = 5'(i);
      p2_load_data = (i % 2 == 0) ? prog2[i / 2][15:8] : prog2[i / 2][7:0];
    end
    @(negedge p2_clk) p2_load_we = 0;
    check("p2 held in reset", 7'({p2_acc, p2_pc}), 7'd0);
    p2_rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [3:0] a0, p0;
      logic [15:0] ins;
      a0 = p2_acc; p0 = p2_pc;
      ins = prog2[m2.pc];
      check("p2 fetch from PC", 7'(p2_pc), 7'(m2.pc));
      @(posedge p2_clk); #1;
      check("p2 phase 1", 7'(p2_phase), 7'd1);
      check("p2 ACC held", 7'(p2_acc), 7'(a0));
      check("p2 PC held", 7'(p2_pc), 7'(p0));
      n_serial++;
      count(m2, ins[15:8], ins[7:0]);
      @(negedge p2_clk);
      check("p2 jump strobe", 7'(p2_jump), 7'(ins[15:8] == OP_JMPZ ||
            (ins[15:8] == OP_JIFZ && m2.acc == 0) || (ins[15:8] == OP_JIFN && m2.acc == 4'hf) ||
            (ins[15:8] == OP_JIFP && m2.acc == 4'h1)));
      @(posedge p2_clk); #1;
      void'(m2.step(ins[15:8], ins[7:0]));
      if (m2.unknown_read) m2.adopt_load(ins[3:0], p2_acc);
      if (m2.carry) n_carry++;
      if (m2.borrow) n_borrow++;
      check("p2 phase 0", 7'(p2_phase), 7'd0);
      check("p2 ACC", 7'(p2_acc), 7'(m2.acc));
      check("p2 PC", 7'(p2_pc), 7'(m2.pc));
      check("p2 ACC display", p2_acc_seg_n, glyph_n(m2.acc));
      check("p2 PC display", p2_pc_seg_n, glyph_n(m2.pc));
    end

    // ---------------- coverage ----------------
    foreach (n_op[k]) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL %s never ran", OPS[k].name()); end
    end
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (n_taken[j] == 0 || n_not[j] == 0) begin
        failures++; $display("FAIL conditional jump %0d: taken %0d, not taken %0d", j, n_taken[j], n_not[j]);
      end
    end
    checks++;
    if (n_taken[3] == 0 || n_carry == 0 || n_borrow == 0 || n_loadback == 0 || n_serial == 0) begin
      failures++;
      $display("FAIL JMPZ %0d, wraps %0d, borrows %0d, load-backs %0d, serial fetches %0d",
               n_taken[3], n_carry, n_borrow, n_loadback, n_serial);
    end
    $display("jumps taken/not: JIFZ %0d/%0d JIFN %0d/%0d JIFP %0d/%0d JMPZ %0d",
             n_taken[0], n_not[0], n_taken[1], n_not[1], n_taken[2], n_not[2], n_taken[3]);
    $display("add wraps %0d, borrows %0d, load-backs %0d, serial fetches %0d",
             n_carry, n_borrow, n_loadback, n_serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
