// cpu4_switch: the switch-programmed 4-bit CPU, with ACC and PC displays.
//
// The operator sets an instruction on DIP switches and steps the clock; ACC
// and PC are shown on two 7-segment displays (active-low segments
// {g..a}). Two ways of entering the two-byte instruction are described for
// this CPU, selected by SERIAL_BYTES:
//   0 (default) two switch sets, dip0 = byte 0 and dip1 = byte 1; every
//     clock executes one instruction and PC advances by one;
//   1 one switch set dip0 holds byte 0 while the PC's least significant bit
//     (phase) is 0 and byte 1 while it is 1; two clocks per instruction,
//     the second executes. dip1 is unused.
// rst_n (asynchronous, active low) clears ACC, PC and phase. jump is high in
// a clock whose edge takes a jump (PC cleared).
module cpu4_switch #(
  parameter bit SERIAL_BYTES = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] dip0,
  input  logic [7:0] dip1,
  output logic [6:0] acc_seg_n,
  output logic [6:0] pc_seg_n,
  output logic [3:0] acc,
  output logic [3:0] pc,
  output logic       phase,
  output logic       jump
);

  logic [7:0] byte0, byte1;
  logic       exec;

  if (SERIAL_BYTES) begin : g_serial
    instr_fetch u_fetch (
      .clk(clk), .rst_n(rst_n), .byte_in(dip0),
      .phase(phase), .byte0(byte0), .byte1(byte1), .exec(exec)
    );
  end else begin : g_parallel
    assign byte0 = dip0;
    assign byte1 = dip1;
    assign exec  = 1'b1;
    assign phase = 1'b0;
  end

  cpu4_core u_core (
    .clk(clk), .rst_n(rst_n), .exec(exec), .byte0(byte0), .byte1(byte1),
    .acc(acc), .pc(pc), .jump_taken(jump)
  );

  dec247 u_acc_disp (.bcd(acc), .lt_n(1'b1), .bi_n(1'b1), .seg_n(acc_seg_n));
  dec247 u_pc_disp  (.bcd(pc),  .lt_n(1'b1), .bi_n(1'b1), .seg_n(pc_seg_n));

endmodule
