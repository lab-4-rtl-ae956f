// cpu4_top: both versions of the 4-bit accumulator CPU side by side.
//
// p1_*: the switch-programmed CPU (instruction on two DIP switch sets, one
// instruction per clock step). p2_*: the stored-program CPU (program loaded
// into a byte-wide RAM while p2_rst_n is low, then run at two clocks per
// instruction). Each has its own clock and reset; both show ACC and PC on
// active-low 7-segment outputs {g..a} and also bring the raw values out,
// with a strobe that is high in a clock whose edge takes a jump.
module cpu4_top (
  input  logic       p1_clk,
  input  logic       p1_rst_n,
  input  logic [7:0] p1_dip0,
  input  logic [7:0] p1_dip1,
  output logic [6:0] p1_acc_seg_n,
  output logic [6:0] p1_pc_seg_n,
  output logic [3:0] p1_acc,
  output logic [3:0] p1_pc,
  output logic       p1_phase,
  output logic       p1_jump,

  input  logic       p2_clk,
  input  logic       p2_rst_n,
  input  logic       p2_load_we,
  input  logic [4:0] p2_load_addr,
  input  logic [7:0] p2_load_data,
  output logic [6:0] p2_acc_seg_n,
  output logic [6:0] p2_pc_seg_n,
  output logic [3:0] p2_acc,
  output logic [3:0] p2_pc,
  output logic       p2_phase,
  output logic       p2_jump
);

  cpu4_switch u_part1 (
    .clk(p1_clk), .rst_n(p1_rst_n), .dip0(p1_dip0), .dip1(p1_dip1),
    .acc_seg_n(p1_acc_seg_n), .pc_seg_n(p1_pc_seg_n),
    .acc(p1_acc), .pc(p1_pc), .phase(p1_phase), .jump(p1_jump)
  );

  cpu4_stored u_part2 (
    .clk(p2_clk), .rst_n(p2_rst_n), .load_we(p2_load_we),
    .load_addr(p2_load_addr), .load_data(p2_load_data),
    .acc_seg_n(p2_acc_seg_n), .pc_seg_n(p2_pc_seg_n),
    .acc(p2_acc), .pc(p2_pc), .phase(p2_phase), .jump(p2_jump)
  );

endmodule
