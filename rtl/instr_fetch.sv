// instr_fetch: byte-serial instruction assembly.
//
// One 8-bit source (a DIP switch set or the program RAM) supplies both bytes
// of an instruction over two clocks. The phase bit is the least significant
// bit of the program counter: in phase 0 the source holds byte 0, which is
// latched at the clock edge; in phase 1 the source holds byte 1, exec is
// high and the CPU executes {latched byte 0, byte 1} at that edge. Phase
// toggles every clock and is cleared by rst_n (asynchronous, active low).
// Both registers are 74174-style flip-flops. The "LSB of PC selects the
// byte" rule is the lab's; keeping the LSB here while the 74569 counter
// counts whole instructions is this design's arrangement.
module instr_fetch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] byte_in,
  output logic       phase,
  output logic [7:0] byte0,
  output logic [7:0] byte1,
  output logic       exec
);

  logic phase_d;

  assign phase_d = ~phase;

  reg174 #(.W(1)) u_phase (
    .clk(clk), .clr_n(rst_n), .en(1'b1), .d(phase_d), .q(phase)
  );

  reg174 #(.W(8)) u_byte0 (
    .clk(clk), .clr_n(rst_n), .en(~phase), .d(byte_in), .q(byte0)
  );

  assign byte1 = byte_in;
  assign exec  = phase;

endmodule
