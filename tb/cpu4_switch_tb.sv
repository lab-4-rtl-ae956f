// cpu4_switch_tb: runs the lab's test program on the switch-programmed CPU,
// in both entry modes side by side, and checks the displayed ACC and PC
// after every instruction against the expected trace:
//   LDI 6 (6,1)  STORE 7 (6,2)  LDI 3 (3,3)  LOAD 7 (6,4)  LDI 7 (7,5)
//   ADD 7 (13,6) JIFN (13,7, not taken)  ADDI 8 (5,8)  JMPZ (5,0)
//   LDI 0 (0,1)  JIFZ (0,0, taken)
// Each CPU has its own clock, pulsed by hand like the lab's toggle switch.
// The two-switch version (default) must finish each instruction in one
// clock, the one-switch version in two, with ACC and PC unchanged after the
// first. Segment outputs are compared with the expected glyphs.
module cpu4_switch_tb;
  import cpu4_pkg::*;
  import cpu4_ref_pkg::*;

  logic       pclk = 0, sclk = 0, rst_n;
  logic [7:0] dip0, dip1, sdip;
  logic [6:0] acc_seg_n, pc_seg_n, s_acc_seg_n, s_pc_seg_n;
  logic [3:0] acc, pc, s_acc, s_pc;
  logic       phase, s_phase, jump, s_jump;
  int checks = 0, failures = 0;
  int n_jumps = 0, s_jumps = 0;

  cpu4_switch dut (
    .clk(pclk), .rst_n(rst_n), .dip0(dip0), .dip1(dip1),
    .acc_seg_n(acc_seg_n), .pc_seg_n(pc_seg_n), .acc(acc), .pc(pc),
    .phase(phase), .jump(jump)
  );

  cpu4_switch #(.SERIAL_BYTES(1'b1)) dut_serial (
    .clk(sclk), .rst_n(rst_n), .dip0(sdip), .dip1(8'h00),
    .acc_seg_n(s_acc_seg_n), .pc_seg_n(s_pc_seg_n), .acc(s_acc), .pc(s_pc),
    .phase(s_phase), .jump(s_jump)
  );

  typedef struct {
    op_e        op;
    logic [3:0] db;
    logic [3:0] addr;
    logic [3:0] exp_acc;
    logic [3:0] exp_pc;
  } step_t;

  localparam int N = 11;
  step_t prog [N] = '{
    '{OP_LDI,   4'd6, 4'd0, 4'd6,  4'd1},
    '{OP_STORE, 4'd0, 4'd7, 4'd6,  4'd2},
    '{OP_LDI,   4'd3, 4'd0, 4'd3,  4'd3},
    '{OP_LOAD,  4'd0, 4'd7, 4'd6,  4'd4},
    '{OP_LDI,   4'd7, 4'd0, 4'd7,  4'd5},
    '{OP_ADD,   4'd0, 4'd7, 4'd13, 4'd6},
    '{OP_JIFN,  4'd0, 4'd0, 4'd13, 4'd7},
    '{OP_ADDI,  4'd8, 4'd0, 4'd5,  4'd8},
    '{OP_JMPZ,  4'd0, 4'd0, 4'd5,  4'd0},
    '{OP_LDI,   4'd0, 4'd0, 4'd0,  4'd1},
    '{OP_JIFZ,  4'd0, 4'd0, 4'd0,  4'd0}
  };

  task automatic check(string what, logic [6:0] got, logic [6:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  always @(posedge pclk) if (jump) n_jumps++;
  always @(posedge sclk) if (s_jump) s_jumps++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock pulse on the chosen CPU only (the other's clock stays low).
  task automatic pulse(bit serial);
    #4;
    if (serial) sclk = 1; else pclk = 1;
    #5;
    if (serial) sclk = 0; else pclk = 0;
    #1;
  endtask

  initial begin
    rst_n = 0; dip0 = OP_NOP; dip1 = 0; sdip = OP_NOP;
    #12 rst_n = 1;
    check("PC display after reset", pc_seg_n, glyph_n(4'd0));
    // Two switch sets: one clock per instruction.
    foreach (prog[i]) begin
      dip0 = prog[i].op; dip1 = {prog[i].db, prog[i].addr};
      pulse(1'b0);
      check("ACC", 7'(acc), 7'(prog[i].exp_acc));
      check("PC", 7'(pc), 7'(prog[i].exp_pc));
      check("ACC display", acc_seg_n, glyph_n(prog[i].exp_acc));
      check("PC display", pc_seg_n, glyph_n(prog[i].exp_pc));
      check("phase stays 0", 7'(phase), 7'd0);
    end
    // One switch set: byte 0 then byte 1, two clocks per instruction.
    foreach (prog[i]) begin
      logic [3:0] acc_before, pc_before;
      acc_before = s_acc; pc_before = s_pc;
      sdip = prog[i].op;
      check("serial: phase 0", 7'(s_phase), 7'd0);
      pulse(1'b1);
      check("serial: phase 1", 7'(s_phase), 7'd1);
      check("serial: ACC held", 7'(s_acc), 7'(acc_before));
      check("serial: PC held", 7'(s_pc), 7'(pc_before));
      sdip = {prog[i].db, prog[i].addr};
      pulse(1'b1);
      check("serial: ACC", 7'(s_acc), 7'(prog[i].exp_acc));
      check("serial: PC", 7'(s_pc), 7'(prog[i].exp_pc));
      check("serial: ACC display", s_acc_seg_n, glyph_n(prog[i].exp_acc));
      check("serial: PC display", s_pc_seg_n, glyph_n(prog[i].exp_pc));
    end
    check("jumps taken", 7'(n_jumps), 7'd2);
    check("serial jumps taken", 7'(s_jumps), 7'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
