// cpu4_core: the 4-bit accumulator CPU datapath and control.
//
// Parts: a 74157-style selector picks the ALU's B operand (RAM word or the
// immediate DB), a 74181-style ALU combines it with A = ACC, a 16 x 4 RAM
// holds data, a 74174-style register holds ACC and a 74569-style counter
// holds PC. The instruction's byte 0 drives the selector, the RAM write and
// the ALU directly (see cpu4_pkg); byte 1 gives DB and the RAM address.
//
// Timing: combinational from the instruction to the ALU result; on the
// rising clock edge with exec high, ACC takes F (or RAM[addr] takes ACC for
// STORE) and PC counts up by one, or is cleared to 0 by a taken jump. exec
// low holds all state. rst_n (asynchronous, active low) clears ACC and PC;
// the RAM keeps its contents.
//
// The instruction set and the one-instruction-per-clock timing follow the
// lab description; the wiring A = ACC, B = selector (the only wiring that
// gives ACC plus ACC and ACC minus RAM on a 74181) and the jump mechanism
// are this design's reading.
module cpu4_core
  import cpu4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exec,
  input  logic [7:0] byte0,
  input  logic [7:0] byte1,
  output logic [3:0] acc,
  output logic [3:0] pc,
  output logic       jump_taken
);

  byte0_t     b0;
  byte1_t     b1;
  logic [3:0] ram_q, opb, f;
  logic       cn4, aeqb, p_n, g_n, rco_n;
  logic       ram_we, acc_load, jump;

  assign b0 = byte0_t'(byte0);
  assign b1 = byte1_t'(byte1);

  mux157 #(.W(4)) u_mux (
    .a(ram_q), .b(b1.db), .sel(b0.mux), .g_n(1'b0), .y(opb)
  );

  alu181 #(.W(4)) u_alu (
    .a(acc), .b(opb), .s(b0.s), .m(b0.m), .cn(b0.cn),
    .f(f), .cn4(cn4), .aeqb(aeqb), .p_n(p_n), .g_n(g_n)
  );

  ctrl_glue u_ctrl (
    .exec(exec), .mux(b0.mux), .w(b0.w), .aeqb(aeqb),
    .ram_we(ram_we), .acc_load(acc_load), .jump(jump)
  );

  ram7489 #(.AW(4), .DW(4)) u_ram (
    .clk(clk), .we(ram_we), .addr(b1.addr), .d(acc), .q(ram_q)
  );

  reg174 #(.W(4)) u_acc (
    .clk(clk), .clr_n(rst_n), .en(acc_load), .d(f), .q(acc)
  );

  ctr569 #(.W(4)) u_pc (
    .clk(clk), .aclr_n(rst_n), .sclr_n(~jump), .load_n(1'b1),
    .enp_n(~exec), .ent_n(1'b0), .up(1'b1), .d(4'd0), .q(pc), .rco_n(rco_n)
  );

  // The ALU's carry and group outputs and the counter's ripple carry have no
  // use in a single 4-bit slice and are left open.
  assign jump_taken = jump;

endmodule
