// cpu4_stored: the same 4-bit CPU executing a program held in RAM.
//
// While rst_n is low the CPU is held at PC = 0, phase = 0, ACC = 0 and a
// program is written into the byte-wide program RAM through load_we /
// load_addr / load_data (instruction k at bytes 2k and 2k+1). After rst_n
// rises the CPU fetches the byte at {PC, phase} each clock: phase 0 latches
// byte 0, phase 1 executes, so an instruction takes two clocks. A taken jump
// clears PC, restarting at byte 0. ACC and PC also drive two 7-segment
// displays; jump is high in a clock whose edge takes a jump. Executing from RAM is the lab's second part; the memory size and
// the reuse of the byte-serial fetch are this design's choices.
module cpu4_stored #(
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [7:0]    load_data,
  output logic [6:0]    acc_seg_n,
  output logic [6:0]    pc_seg_n,
  output logic [3:0]    acc,
  output logic [3:0]    pc,
  output logic          phase,
  output logic          jump
);

  logic [7:0]    pbyte, byte0, byte1;
  logic [AW-1:0] fetch_addr;
  logic          exec;

  assign fetch_addr = AW'({pc, phase});

  prog_mem #(.AW(AW)) u_prog (
    .clk(clk), .we(load_we), .waddr(load_addr), .wdata(load_data),
    .raddr(fetch_addr), .rdata(pbyte)
  );

  instr_fetch u_fetch (
    .clk(clk), .rst_n(rst_n), .byte_in(pbyte),
    .phase(phase), .byte0(byte0), .byte1(byte1), .exec(exec)
  );

  cpu4_core u_core (
    .clk(clk), .rst_n(rst_n), .exec(exec), .byte0(byte0), .byte1(byte1),
    .acc(acc), .pc(pc), .jump_taken(jump)
  );

  dec247 u_acc_disp (.bcd(acc), .lt_n(1'b1), .bi_n(1'b1), .seg_n(acc_seg_n));
  dec247 u_pc_disp  (.bcd(pc),  .lt_n(1'b1), .bi_n(1'b1), .seg_n(pc_seg_n));

endmodule
